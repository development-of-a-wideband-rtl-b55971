// bg_noise_lut - spectrum of the coloured background noise, one complex Q15.14 value
// per FFT bin, added in the frequency domain to the channel output.
//
// Coloured background noise is strongest at low frequency and falls off roughly
// exponentially, so its magnitude per bin is modelled as
//   |N(f)| = N_INF + N_0 * exp(-f / F_1)
// with a pseudo-random phase per bin (a fixed integer hash of the bin number). Bins
// above N/2 hold the conjugate of bin N-k so the noise is real after the IFFT. The
// table is computed at initialisation and read like a ROM.
// That the noise is a stored look-up table added after the multiplier is the
// published design; the exponential model, its constants (in Q15.14 units of the
// multiplier output) and the phase are this design's choices.
//
// Interface: rd_en/bin in, n_re/n_im one clock later.
module bg_noise_lut
  import plc_pkg::*;
#(
  parameter int unsigned NPTS  = NFFT,
  parameter int unsigned W     = CPLX_W,
  parameter real         N_INF = 0.02,
  parameter real         N_0   = 0.6,
  parameter real         F_1   = 2.5e6
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(NPTS)-1:0]  bin,
  output logic signed [W-1:0]      n_re,
  output logic signed [W-1:0]      n_im
);

  logic signed [W-1:0] rom_re [NPTS];
  logic signed [W-1:0] rom_im [NPTS];

  initial begin
    for (int k = 0; k < int'(NPTS); k++) begin
      int unsigned kf;
      real mag, ph;
      kf  = bin_negative(k, NPTS) ? NPTS - k : k;
      mag = N_INF + N_0 * $exp(-bin_freq(k, NPTS) / F_1);
      ph  = (kf == 0 || kf == NPTS / 2) ? 0.0 : hash_phase(kf, 1);
      if (bin_negative(k, NPTS)) ph = -ph;
      rom_re[k] = to_fix(mag * $cos(ph));
      rom_im[k] = to_fix(mag * $sin(ph));
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      n_re <= rom_re[bin];
      n_im <= rom_im[bin];
    end
  end

endmodule
