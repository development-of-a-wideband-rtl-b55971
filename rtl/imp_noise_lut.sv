// imp_noise_lut - spectrum of the impulsive noise, one complex Q15.14 value per FFT
// bin, added in the frequency domain to the channel output.
//
// Impulsive noise is a train of short bursts, each a damped sinusoid
//   p(t) = e^(-t/TAU) * sin(2*pi*FP*t),  t >= 0,
// whose spectrum, normalised to 1 at DC, is
//   P(f) = (1/TAU^2 + wp^2) / ((1/TAU + j*w)^2 + wp^2),   w = 2*pi*f, wp = 2*pi*FP.
// Four bursts of amplitude AM_m start at sample positions TM_m of the 4096-sample
// frame, so the stored spectrum is sum_m AM_m * P(f) * e^(-j*w*TM_m/fs). Bins above
// N/2 hold the conjugate of bin N-k so the noise is real after the IFFT. The table is
// computed at initialisation and read like a ROM.
// The look-up table and its place after the multiplier are the published design; the
// burst model, its constants (in Q15.14 units of the multiplier output) and the burst
// times are this design's choices.
//
// Interface: rd_en/bin in, n_re/n_im one clock later.
module imp_noise_lut
  import plc_pkg::*;
#(
  parameter int unsigned NPTS = NFFT,
  parameter int unsigned W    = CPLX_W,
  parameter real         TAU  = 0.1e-6,
  parameter real         FP   = 2.0e6
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(NPTS)-1:0]  bin,
  output logic signed [W-1:0]      n_re,
  output logic signed [W-1:0]      n_im
);

  localparam int unsigned NB = 4;
  localparam real AM [NB] = '{ 1.2, -0.8, -1.1, 0.7 };
  localparam real TM [NB] = '{ 96.0, 1120.0, 2144.0, 3168.0 };

  logic signed [W-1:0] rom_re [NPTS];
  logic signed [W-1:0] rom_im [NPTS];

  initial begin
    for (int k = 0; k < int'(NPTS); k++) begin
      real w, wp, a, dr, di, dm, pr, pi_, sr, si, th;
      w   = 2.0 * PI * bin_freq(k, NPTS);
      wp  = 2.0 * PI * FP;
      a   = 1.0 / TAU;
      // P = (a^2 + wp^2) / (a^2 - w^2 + wp^2 + j*2*a*w)
      dr  = a * a - w * w + wp * wp;
      di  = 2.0 * a * w;
      dm  = dr * dr + di * di;
      pr  = (a * a + wp * wp) * dr / dm;
      pi_ = -(a * a + wp * wp) * di / dm;
      sr  = 0.0;
      si  = 0.0;
      for (int m = 0; m < int'(NB); m++) begin
        th = w * TM[m] / FS_HZ;
        // AM * P * (cos th - j sin th)
        sr = sr + AM[m] * (pr * $cos(th) + pi_ * $sin(th));
        si = si + AM[m] * (pi_ * $cos(th) - pr * $sin(th));
      end
      if (bin_negative(k, NPTS)) si = -si;
      if (k == int'(NPTS / 2))   si = 0.0;
      rom_re[k] = to_fix(sr);
      rom_im[k] = to_fix(si);
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      n_re <= rom_re[bin];
      n_im <= rom_im[bin];
    end
  end

endmodule
