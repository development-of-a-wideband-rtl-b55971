// channel_lut - transfer function look-up tables of the four reference power-line
// channels, one complex value per FFT bin.
//
// Each channel follows the Zimmermann-Dostert multipath model,
//   H(f) = sum_i g_i * exp(-(a0 + a1*f^k)*d_i) * exp(-j*2*pi*f*d_i/vp),
// split with Euler's formula into a real table (cos term) and an imaginary table
// (minus the sin term). The two tables are separate memories read with the same
// address, so the real and imaginary parts come out together for the multiplier.
// Values are Q15.14 (29 bits, 14 fractional bits). Bin k holds f = k*24.414 kHz for
// k <= N/2; the upper half holds the complex conjugate of bin N-k (and bin N/2 is made
// real), so that the channel keeps the time-domain signal real.
//
// The tables are filled at elaboration/initialisation from the model, which maps onto
// ROM initialisation on an FPGA. The model and the table format follow the published
// design; the path parameters (gains, lengths, attenuation) of the four channels
// (150 m good, 150 m medium, 150 m bad, 250 m good) are this design's own, chosen to
// give responses of the same character: a few tens of dB of roll-off over 10 MHz, and
// for the bad channel a deep notch near 4.8 MHz where two near-equal paths 16.7 m
// apart cancel.
//
// Interface: ch_sel picks the channel, bin the frequency; tf_en = 0 selects "no
// transfer function" (H = 1.0). Registered read: h_re/h_im one clock after rd_en.
module channel_lut
  import plc_pkg::*;
#(
  parameter int unsigned N_CH  = 4,
  parameter int unsigned NPTS  = NFFT,
  parameter int unsigned MAX_P = 6,
  parameter int unsigned W     = CPLX_W
) (
  input  logic                        clk,
  input  logic                        rd_en,
  input  logic [$clog2(N_CH)-1:0]     ch_sel,
  input  logic                        tf_en,
  input  logic [$clog2(NPTS)-1:0]     bin,
  output logic signed [W-1:0]         h_re,
  output logic signed [W-1:0]         h_im
);

  localparam int unsigned AW = $clog2(N_CH) + $clog2(NPTS);
  localparam real VP = 1.5e8;   // propagation speed, c0/sqrt(4)

  // Path parameters per channel (unused paths have zero gain)
  localparam real G [4][6] = '{
    '{ 0.064,  0.038, -0.015,  0.005,  0.0,    0.0   },   // 150 m good
    '{ 0.070,  0.035, -0.020,  0.010, -0.006,  0.0   },   // 150 m medium
    '{ 0.050,  0.060,  0.012, -0.008,  0.0,    0.0   },   // 150 m bad
    '{ 0.090,  0.040, -0.020,  0.010,  0.0,    0.0   }    // 250 m good
  };
  localparam real D [4][6] = '{
    '{ 150.0, 166.8, 183.6, 200.6, 0.0,   0.0   },
    '{ 150.0, 162.0, 177.0, 190.0, 205.0, 0.0   },
    '{ 150.0, 166.7, 190.0, 230.0, 0.0,   0.0   },
    '{ 250.0, 271.0, 296.0, 318.0, 0.0,   0.0   }
  };
  localparam real A0 [4] = '{ 0.0,    0.0,    0.0,    0.0    };
  localparam real A1 [4] = '{ 1.0e-9, 3.8e-9, 2.5e-9, 2.5e-9 };
  localparam real KX [4] = '{ 1.0,    1.0,    1.0,    1.0    };

  logic signed [W-1:0] rom_re [N_CH*NPTS];
  logic signed [W-1:0] rom_im [N_CH*NPTS];

  initial begin
    for (int ch = 0; ch < int'(N_CH); ch++) begin
      for (int k = 0; k < int'(NPTS); k++) begin
        real f, sr, si, att, ph;
        f  = bin_freq(k, NPTS);
        sr = 0.0;
        si = 0.0;
        for (int p = 0; p < int'(MAX_P); p++) begin
          att = G[ch % 4][p] * $exp(-(A0[ch % 4] + A1[ch % 4] * (f ** KX[ch % 4])) * D[ch % 4][p]);
          ph  = 2.0 * PI * f * D[ch % 4][p] / VP;
          sr  = sr + att * $cos(ph);
          si  = si - att * $sin(ph);
        end
        if (bin_negative(k, NPTS)) si = -si;
        if (k == int'(NPTS / 2))   si = 0.0;
        rom_re[ch * NPTS + k] = to_fix(sr);
        rom_im[ch * NPTS + k] = to_fix(si);
      end
    end
  end

  logic [AW-1:0] addr;
  assign addr = {ch_sel, bin};

  always_ff @(posedge clk) begin
    if (rd_en) begin
      if (tf_en) begin
        h_re <= rom_re[addr];
        h_im <= rom_im[addr];
      end else begin
        h_re <= W'(1) << FRAC_W;   // 1.0
        h_im <= '0;
      end
    end
  end

endmodule
