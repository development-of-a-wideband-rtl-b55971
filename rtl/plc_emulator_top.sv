// plc_emulator_top - digital datapath of a wideband power-line channel emulator.
//
// The emulator makes a power-line link between two modems reproducible in the lab: a
// test signal is sampled, passed through the frequency response of one of four
// reference power-line channels, has a randomly chosen mix of power-line noise added,
// and is played out again. All channel and noise effects are applied in the frequency
// domain, one FFT bin per clock at 100 MHz, 4096 bins (24.414 kHz apart) per frame.
//
//   ADC code -> linear_regression -> [FFT, external] -> channel multiply -> + noise
//            -> [IFFT, external]
//
// Time-domain front half: the 14-bit ADC code goes through linear_regression (the
// fitted code-to-amplitude lines) and leaves, sign-extended to 16 bits, on fft_xn_*
// for the FFT core. Frequency-domain half: each FFT output bin (fft_xk_*, with its
// bin index) is registered once, then addresses the channel tables (channel_lut, the
// channel chosen by the selector switches through channel_selector) and the three
// noise tables. complex_mult multiplies the bin by the channel response;
// noise_selector adds the noise scenario chosen by the random number generator
// (lfsr_rng), and the result leaves on ifft_xn_* for the IFFT core. The FFT and IFFT
// cores, the ADC and the DAC are outside this module.
//
// Timing: linear_regression has a latency of 1 clock. The frequency path has a
// latency of 5 clocks from fft_xk_valid to ifft_xn_valid (input register, table read,
// two multiplier stages, noise adder) and takes one bin every clock without stalls.
// The channel switches and the random noise code are both captured at the frame's
// first bin (index 0), so each frame has one channel and one noise scenario.
// The FFT must deliver each frame's bins in index order (bin 4095 wraps to bin 0); an
// assertion flags any other order.
// rng_run = 0 stops the random generator and holds the current noise code, as the
// published test switch does; rng_load_seed loads rng_seed.
// The arrangement of blocks follows the published emulator; the pipeline registers,
// the per-frame capture and the port-level handshake are this design's choices.
module plc_emulator_top
  import plc_pkg::*;
#(
  parameter int unsigned NPTS = NFFT,
  parameter int unsigned W    = CPLX_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // ADC side (time domain)
  input  logic                        adc_valid,
  input  logic [ADC_W-1:0]            adc_code,
  output logic                        fft_xn_valid,
  output logic signed [FFT_IN_W-1:0]  fft_xn_re,
  output logic signed [26:0]          lr_y_full,     // regression value before truncation
  // FFT output (frequency domain, natural order)
  input  logic                        fft_xk_valid,
  input  logic [$clog2(NPTS)-1:0]     fft_xk_index,
  input  logic signed [W-1:0]         fft_xk_re,
  input  logic signed [W-1:0]         fft_xk_im,
  // User controls
  input  logic [3:0]                  sw_channel,
  input  logic                        rng_run,
  input  logic                        rng_load_seed,
  input  logic [31:0]                 rng_seed,
  // IFFT input
  output logic                        ifft_xn_valid,
  output logic                        ifft_xn_sof,
  output logic signed [W-1:0]         ifft_xn_re,
  output logic signed [W-1:0]         ifft_xn_im,
  // Status
  output logic [2:0]                  noise_code,
  output logic [31:0]                 rng_state,
  output logic                        noise_sat,
  output logic                        channel_tf_en,
  output logic [1:0]                  channel_sel,
  output logic                        channel_code_err
);

  localparam int unsigned BW = $clog2(NPTS);

  // ---------------------------------------------------------------- time domain
  logic signed [ADC_W-1:0] lr_out;

  linear_regression #(.ADC_W(ADC_W)) u_linreg (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (adc_valid),
    .adc_code  (adc_code),
    .out_valid (fft_xn_valid),
    .y_full    (lr_y_full),
    .y_out     (lr_out)
  );

  assign fft_xn_re = FFT_IN_W'(lr_out);

  // ---------------------------------------------------------- frequency domain
  logic          sof_in;
  assign sof_in = fft_xk_valid && (fft_xk_index == '0);

  // Stage A: input register; the selector has captured the switches by now.
  logic          va_q, sofa_q;
  logic [BW-1:0] bina_q;
  samp_t         rea_q, ima_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      va_q   <= 1'b0;
      sofa_q <= 1'b0;
      bina_q <= '0;
      rea_q  <= '0;
      ima_q  <= '0;
    end else begin
      va_q   <= fft_xk_valid;
      sofa_q <= sof_in;
      if (fft_xk_valid) begin
        bina_q <= fft_xk_index;
        rea_q  <= fft_xk_re;
        ima_q  <= fft_xk_im;
      end
    end
  end

  channel_selector u_chsel (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (sof_in),
    .sw       (sw_channel),
    .tf_en    (channel_tf_en),
    .ch_sel   (channel_sel),
    .code_err (channel_code_err)
  );

  // Stage B: table outputs, bin data delayed to match.
  samp_t h_re, h_im;
  samp_t bg_re, bg_im, nb_re, nb_im, imp_re, imp_im;

  channel_lut #(.NPTS(NPTS), .W(W)) u_chlut (
    .clk    (clk),
    .rd_en  (va_q),
    .ch_sel (channel_sel),
    .tf_en  (channel_tf_en),
    .bin    (bina_q),
    .h_re   (h_re),
    .h_im   (h_im)
  );

  bg_noise_lut #(.NPTS(NPTS), .W(W)) u_bg (
    .clk (clk), .rd_en (va_q), .bin (bina_q), .n_re (bg_re), .n_im (bg_im)
  );

  nb_noise_lut #(.NPTS(NPTS), .W(W)) u_nb (
    .clk (clk), .rd_en (va_q), .bin (bina_q), .n_re (nb_re), .n_im (nb_im)
  );

  imp_noise_lut #(.NPTS(NPTS), .W(W)) u_imp (
    .clk (clk), .rd_en (va_q), .bin (bina_q), .n_re (imp_re), .n_im (imp_im)
  );

  logic  vb_q, sofb_q;
  samp_t reb_q, imb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vb_q   <= 1'b0;
      sofb_q <= 1'b0;
      reb_q  <= '0;
      imb_q  <= '0;
    end else begin
      vb_q   <= va_q;
      sofb_q <= sofa_q;
      if (va_q) begin
        reb_q <= rea_q;
        imb_q <= ima_q;
      end
    end
  end

  // Channel multiplication (2 clocks)
  logic  vm, sofc_q, sofd_q;
  samp_t m_re, m_im;

  complex_mult #(.W(W), .FRAC(FRAC_W)) u_mult (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (vb_q),
    .a         (reb_q),
    .b         (imb_q),
    .c         (h_re),
    .d         (h_im),
    .out_valid (vm),
    .p_re      (m_re),
    .p_im      (m_im)
  );

  // Noise values delayed by the multiplier's two clocks
  samp_t nz_q [2][6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sofc_q <= 1'b0;
      sofd_q <= 1'b0;
      for (int s = 0; s < 2; s++)
        for (int i = 0; i < 6; i++)
          nz_q[s][i] <= '0;
    end else begin
      sofc_q   <= sofb_q;
      sofd_q   <= sofc_q;
      nz_q[0]  <= '{imp_re, imp_im, nb_re, nb_im, bg_re, bg_im};
      nz_q[1]  <= nz_q[0];
    end
  end

  // Random noise code
  logic [2:0]  rng_rnd;

  lfsr_rng #(.RND_W(3)) u_rng (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (rng_run),
    .load_seed (rng_load_seed),
    .seed      (rng_seed),
    .state     (rng_state),
    .rnd       (rng_rnd)
  );

  noise_selector #(.W(W)) u_nsel (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (vm),
    .in_sof    (sofd_q),
    .code      (rng_rnd),
    .s_re      (m_re),
    .s_im      (m_im),
    .imp_re    (nz_q[1][0]),
    .imp_im    (nz_q[1][1]),
    .nb_re     (nz_q[1][2]),
    .nb_im     (nz_q[1][3]),
    .bg_re     (nz_q[1][4]),
    .bg_im     (nz_q[1][5]),
    .out_valid (ifft_xn_valid),
    .y_re      (ifft_xn_re),
    .y_im      (ifft_xn_im),
    .sat       (noise_sat),
    .code_used (noise_code)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ifft_xn_sof <= 1'b0;
    else        ifft_xn_sof <= vm && sofd_q;
  end

  // Interface rules of the FFT side: bins of a frame arrive in order (each valid bin
  // after bin 0 follows its predecessor), and a frame marker only leaves with data.
  logic [BW-1:0] last_index_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            last_index_q <= '1;
    else if (fft_xk_valid) last_index_q <= fft_xk_index;
  end

  a_bin_order: assert property (@(posedge clk) disable iff (!rst_n)
    fft_xk_valid |-> (fft_xk_index == last_index_q + 1'b1))
    else $error("FFT bins out of order: %0d after %0d", fft_xk_index, last_index_q);

  a_sof_valid: assert property (@(posedge clk) disable iff (!rst_n)
    ifft_xn_sof |-> ifft_xn_valid);

endmodule
