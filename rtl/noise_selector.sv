// noise_selector - picks the noise scenario from the random code and adds the chosen
// noise spectra to the channel output, bin by bin, before the IFFT.
//
// The three noise tables (impulsive, narrowband, background) are the inputs of a
// multiplexer whose select lines carry a 3-bit code from the random number generator:
//   000 none          011 background            110 background + narrowband
//   001 impulsive     100 impulsive + background 111 all three
//   010 narrowband    101 impulsive + narrowband
// The code table is the published one. The selected noise values are summed with the
// signal bin in a two-bit-wider adder and saturated to W bits (sat flags it); the
// saturation is this design's choice. The code is captured on the first bin of a
// frame (in_sof) and used for that bin and the rest of the frame, so one FFT frame
// always carries one scenario; when in_sof is high the new code already applies.
//
// Interface: in_valid/in_sof with the signal and noise values of one bin; out_valid,
// y_re/y_im, sat and the code in use one clock later. One bin per clock, no stall.
module noise_selector
  import plc_pkg::*;
#(
  parameter int unsigned W = CPLX_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_sof,
  input  logic [2:0]          code,
  input  logic signed [W-1:0] s_re,
  input  logic signed [W-1:0] s_im,
  input  logic signed [W-1:0] imp_re,
  input  logic signed [W-1:0] imp_im,
  input  logic signed [W-1:0] nb_re,
  input  logic signed [W-1:0] nb_im,
  input  logic signed [W-1:0] bg_re,
  input  logic signed [W-1:0] bg_im,
  output logic                out_valid,
  output logic signed [W-1:0] y_re,
  output logic signed [W-1:0] y_im,
  output logic                sat,
  output logic [2:0]          code_used
);

  localparam logic signed [W+1:0] MAXV = (W+2)'((64'sd1 <<< (W-1)) - 1);
  localparam logic signed [W+1:0] MINV = -(W+2)'(64'sd1 <<< (W-1));

  logic [2:0]          code_q, code_now;
  noise_en_t           en;
  logic signed [W+1:0] sum_re, sum_im;
  logic                sat_re, sat_im;

  function automatic logic signed [W+1:0] ext(input logic signed [W-1:0] v, input logic on);
    return on ? (W+2)'(v) : '0;
  endfunction

  always_comb begin
    code_now = (in_valid && in_sof) ? code : code_q;
    en       = noise_decode(code_now);
    sum_re   = (W+2)'(s_re) + ext(imp_re, en.imp) + ext(nb_re, en.nb) + ext(bg_re, en.bg);
    sum_im   = (W+2)'(s_im) + ext(imp_im, en.imp) + ext(nb_im, en.nb) + ext(bg_im, en.bg);
    sat_re   = (sum_re > MAXV) || (sum_re < MINV);
    sat_im   = (sum_im > MAXV) || (sum_im < MINV);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_q    <= '0;
      out_valid <= 1'b0;
      y_re      <= '0;
      y_im      <= '0;
      sat       <= 1'b0;
      code_used <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        code_q    <= code_now;
        code_used <= code_now;
        y_re      <= (sum_re > MAXV) ? MAXV[W-1:0] : (sum_re < MINV) ? MINV[W-1:0] : sum_re[W-1:0];
        y_im      <= (sum_im > MAXV) ? MAXV[W-1:0] : (sum_im < MINV) ? MINV[W-1:0] : sum_im[W-1:0];
        sat       <= sat_re || sat_im;
      end
    end
  end

endmodule
