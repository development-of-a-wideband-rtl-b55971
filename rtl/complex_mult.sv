// complex_mult - multiplies one FFT bin (a + jb) by the channel transfer function
// (c + jd) for that bin, the frequency-domain equivalent of passing the signal
// through the channel.
//
// The product is expanded term by term (FOIL): re = ac - bd, im = ad + bc. Each of the
// four partial products is formed as in the published design: both factors are turned
// into magnitudes, the unsigned magnitudes are multiplied into a register twice the
// operand width, and the sign is put back with a two's complement when exactly one
// factor was negative. This keeps every partial product inside 2*W bits without a
// guard bit. The sums are then truncated to fit the IFFT: the 14 fractional bits of
// one operand are dropped (arithmetic shift) and the low W bits kept, so the result
// again has 14 fractional bits. Operands and result are W = 29 bits, Q15.14.
//
// Timing: fully pipelined, one bin per clock, latency 2 (partial products, then
// sums). The pipeline depth and the wrap-around truncation are this design's choices;
// the published text says only that the padded register "is then truncated".
module complex_mult
  import plc_pkg::*;
#(
  parameter int unsigned W    = CPLX_W,
  parameter int unsigned FRAC = FRAC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] a,      // FFT real
  input  logic signed [W-1:0] b,      // FFT imaginary
  input  logic signed [W-1:0] c,      // transfer function real
  input  logic signed [W-1:0] d,      // transfer function imaginary
  output logic                out_valid,
  output logic signed [W-1:0] p_re,
  output logic signed [W-1:0] p_im
);

  localparam int unsigned PW = 2 * W;   // padded product register

  // Sign-magnitude multiply: magnitudes need W bits (|-2^(W-1)| = 2^(W-1)).
  function automatic logic signed [PW-1:0] sm_mult(input logic signed [W-1:0] x,
                                                    input logic signed [W-1:0] y);
    logic [W-1:0]  mx, my;
    logic [PW-1:0] mp;
    mx = x[W-1] ? W'(-x) : W'(x);
    my = y[W-1] ? W'(-y) : W'(y);
    mp = PW'(mx) * PW'(my);
    return (x[W-1] ^ y[W-1]) ? $signed(-mp) : $signed(mp);
  endfunction

  logic signed [PW-1:0] ac_q, bd_q, ad_q, bc_q;
  logic                 v1_q;
  logic signed [PW:0]   re_full, im_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q <= 1'b0;
      ac_q <= '0;
      bd_q <= '0;
      ad_q <= '0;
      bc_q <= '0;
    end else begin
      v1_q <= in_valid;
      if (in_valid) begin
        ac_q <= sm_mult(a, c);
        bd_q <= sm_mult(b, d);
        ad_q <= sm_mult(a, d);
        bc_q <= sm_mult(b, c);
      end
    end
  end

  always_comb begin
    re_full = (PW+1)'(ac_q) - (PW+1)'(bd_q);
    im_full = (PW+1)'(ad_q) + (PW+1)'(bc_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p_re      <= '0;
      p_im      <= '0;
    end else begin
      out_valid <= v1_q;
      if (v1_q) begin
        p_re <= re_full[FRAC +: W];
        p_im <= im_full[FRAC +: W];
      end
    end
  end

endmodule
