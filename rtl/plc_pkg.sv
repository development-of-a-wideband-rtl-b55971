// plc_pkg - types and constants shared by the PLC channel emulator datapath.
//
// The emulator works on one complex frequency bin per clock. Every frequency-domain
// quantity (FFT output, channel transfer function, noise spectra, the value handed to
// the IFFT) is a 29-bit two's complement number with 14 fractional bits (Q15.14), as
// the design stores its transfer functions. The 4096-point transform at a 100 MHz
// sample clock gives a bin spacing of 100e6/4096 = 24.414 kHz, the HomePlug AV
// subcarrier spacing. The path parameters of the four reference channels are this
// design's own choice (see channel_lut).
package plc_pkg;

  // Transform and number format
  localparam int unsigned NFFT      = 4096;       // transform points
  localparam real         FS_HZ     = 100.0e6;    // sample clock
  localparam int unsigned ADC_W     = 14;         // ADC sample width
  localparam int unsigned FFT_IN_W  = 16;         // FFT input width (29 - 12 - 1)
  localparam int unsigned CPLX_W    = 29;         // bin value width
  localparam int unsigned FRAC_W    = 14;         // fractional bits

  localparam real         PI        = 3.14159265358979323846;

  typedef logic signed [CPLX_W-1:0] samp_t;

  typedef struct packed {
    samp_t re;
    samp_t im;
  } cplx_t;

  // Noise combination codes of the random noise selector
  typedef enum logic [2:0] {
    NZ_NONE     = 3'b000,
    NZ_IMP      = 3'b001,
    NZ_NB       = 3'b010,
    NZ_BG       = 3'b011,
    NZ_IMP_BG   = 3'b100,
    NZ_IMP_NB   = 3'b101,
    NZ_BG_NB    = 3'b110,
    NZ_ALL      = 3'b111
  } noise_code_e;

  // Noise enables (impulsive, narrowband, background) for a combination code
  typedef struct packed {
    logic imp;
    logic nb;
    logic bg;
  } noise_en_t;

  function automatic noise_en_t noise_decode(input logic [2:0] code);
    noise_en_t e;
    unique case (code)
      NZ_NONE:   e = '{imp: 1'b0, nb: 1'b0, bg: 1'b0};
      NZ_IMP:    e = '{imp: 1'b1, nb: 1'b0, bg: 1'b0};
      NZ_NB:     e = '{imp: 1'b0, nb: 1'b1, bg: 1'b0};
      NZ_BG:     e = '{imp: 1'b0, nb: 1'b0, bg: 1'b1};
      NZ_IMP_BG: e = '{imp: 1'b1, nb: 1'b0, bg: 1'b1};
      NZ_IMP_NB: e = '{imp: 1'b1, nb: 1'b1, bg: 1'b0};
      NZ_BG_NB:  e = '{imp: 1'b0, nb: 1'b1, bg: 1'b1};
      default:   e = '{imp: 1'b1, nb: 1'b1, bg: 1'b1};
    endcase
    return e;
  endfunction

  // Frequency in Hz of bin k of an N-point transform, folded so that bins above N/2
  // are the negative frequencies (returned as their magnitude).
  function automatic real bin_freq(input int unsigned k, input int unsigned n);
    int unsigned kk;
    kk = (k <= n/2) ? k : n - k;
    return real'(kk) * FS_HZ / real'(n);
  endfunction

  // True when bin k lies in the negative-frequency half (its value is the conjugate
  // of bin N-k, so that the IFFT output is real).
  function automatic bit bin_negative(input int unsigned k, input int unsigned n);
    return k > n/2;
  endfunction

  // Round a real value to Q15.14 with saturation to the 29-bit range.
  function automatic samp_t to_fix(input real v);
    real s;
    real lim;
    s   = v * real'(64'd1 << FRAC_W);
    lim = real'(64'd1 << (CPLX_W-1));
    if (s >  lim - 1.0) s =  lim - 1.0;
    if (s < -lim)       s = -lim;
    // $rtoi truncates toward zero; adding or subtracting 0.5 rounds half away from zero
    return samp_t'((s >= 0.0) ? $rtoi(s + 0.5) : -$rtoi(-s + 0.5));
  endfunction

  // Deterministic pseudo-random phase in [0, 2*pi) for bin k (integer hash of k and a
  // per-table salt); used to give the stored noise spectra a noise-like phase.
  function automatic real hash_phase(input int unsigned k, input int unsigned salt);
    int unsigned h;
    h = k * 32'd2654435761 + salt * 32'd40503 + 32'd12345;
    h = h ^ (h >> 15);
    h = h * 32'd2246822519;
    h = h ^ (h >> 13);
    return 2.0 * PI * real'(h & 32'hFFFF) / 65536.0;
  endfunction

endpackage
