// nb_noise_lut - spectrum of the narrowband noise, one complex Q15.14 value per FFT
// bin, added in the frequency domain to the channel output.
//
// Narrowband interference (broadcast and amateur radio stations coupling into the
// line) is a sum of Gaussian-shaped peaks,
//   |N(f)| = sum_k A_k * exp(-(f - f0_k)^2 / (2 * B_k^2)),
// given a pseudo-random phase per bin (a fixed integer hash of the bin number). Bins
// above N/2 hold the conjugate of bin N-k so the noise is real after the IFFT. The
// table is computed at initialisation and read like a ROM.
// The Gaussian-sum model and the look-up table are the published design; the number
// of interferers, their centre frequencies, widths and amplitudes (in Q15.14 units of
// the multiplier output) are this design's choices.
//
// Interface: rd_en/bin in, n_re/n_im one clock later.
module nb_noise_lut
  import plc_pkg::*;
#(
  parameter int unsigned NPTS = NFFT,
  parameter int unsigned W    = CPLX_W
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(NPTS)-1:0]  bin,
  output logic signed [W-1:0]      n_re,
  output logic signed [W-1:0]      n_im
);

  localparam int unsigned NI = 3;
  localparam real AK [NI] = '{ 0.40,   0.30,   0.25   };
  localparam real F0 [NI] = '{ 3.9e6,  7.1e6,  9.6e6  };
  localparam real BK [NI] = '{ 50.0e3, 60.0e3, 40.0e3 };

  logic signed [W-1:0] rom_re [NPTS];
  logic signed [W-1:0] rom_im [NPTS];

  initial begin
    for (int k = 0; k < int'(NPTS); k++) begin
      int unsigned kf;
      real f, mag, ph;
      kf  = bin_negative(k, NPTS) ? NPTS - k : k;
      f   = bin_freq(k, NPTS);
      mag = 0.0;
      for (int i = 0; i < int'(NI); i++)
        mag = mag + AK[i] * $exp(-((f - F0[i]) ** 2) / (2.0 * BK[i] * BK[i]));
      ph  = (kf == 0 || kf == NPTS / 2) ? 0.0 : hash_phase(kf, 2);
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
