// tb_workload_tone - accuracy workload: a 1.23 MHz tone through each reference channel.
//
// A 4096-sample 1.23 MHz sine (amplitude 6000 codes) is fed as ADC codes through the
// design's regression stage; the testbench then plays the FFT core with a
// floating-point radix-2 FFT of the regression output, rounded to integers as an
// unscaled fixed-point core would deliver them, and streams the bins through the
// channel and noise stages with the noise generator stopped on "no noise". For "no
// transfer function" and each of the four channels the output bins are compared with
// the floating-point product of the FFT and the multipath model: the error at the
// tone bin must stay below 0.5 % and the mean relative error over the bins whose
// magnitude exceeds 1.0 (in Q15.14 units) below 1 %. Both figures are printed.
module tb_workload_tone;
  import plc_ref_pkg::*;
  localparam int N = 4096;
  localparam int K0 = 50;   // 1.23 MHz / 24.414 kHz = 50.4

  logic clk = 0, rst_n = 0;
  logic adc_valid = 0;
  logic [13:0] adc_code = '0;
  logic fft_xn_valid;
  logic signed [15:0] fft_xn_re;
  logic signed [26:0] lr_y_full;
  logic fft_xk_valid = 0;
  logic [11:0] fft_xk_index = '0;
  logic signed [28:0] fft_xk_re = 0, fft_xk_im = 0;
  logic [3:0] sw_channel = '0;
  logic rng_run = 0, rng_load_seed = 0;
  logic [31:0] rng_seed = '0;
  logic ifft_xn_valid, ifft_xn_sof;
  logic signed [28:0] ifft_xn_re, ifft_xn_im;
  logic [2:0] noise_code;
  logic [31:0] rng_state;
  logic noise_sat, channel_tf_en, channel_code_err;
  logic [1:0] channel_sel;

  plc_emulator_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xr [N], xi [N];
  longint fr [N], fi [N];
  longint outr [N], outi [N];
  int nout;

  // in-place iterative radix-2 FFT on xr/xi
  task automatic fft();
    int j;
    j = 0;
    for (int i = 0; i < N - 1; i++) begin
      int m;
      if (i < j) begin
        real t;
        t = xr[i]; xr[i] = xr[j]; xr[j] = t;
        t = xi[i]; xi[i] = xi[j]; xi[j] = t;
      end
      m = N / 2;
      while (m >= 1 && j >= m) begin j = j - m; m = m / 2; end
      j = j + m;
    end
    for (int len = 2; len <= N; len = len * 2) begin
      for (int s = 0; s < N; s = s + len) begin
        for (int q = 0; q < len / 2; q++) begin
          real wr, wi, ur, ui, vr, vi;
          wr = $cos(-2.0 * PI_R * q / len);
          wi = $sin(-2.0 * PI_R * q / len);
          ur = xr[s + q]; ui = xi[s + q];
          vr = xr[s + q + len/2] * wr - xi[s + q + len/2] * wi;
          vi = xr[s + q + len/2] * wi + xi[s + q + len/2] * wr;
          xr[s + q] = ur + vr;          xi[s + q] = ui + vi;
          xr[s + q + len/2] = ur - vr;  xi[s + q + len/2] = ui - vi;
        end
      end
    end
  endtask

  always @(posedge clk) begin
    if (ifft_xn_valid && nout < N) begin
      outr[nout] = longint'(ifft_xn_re);
      outi[nout] = longint'(ifft_xn_im);
      nout++;
    end
  end

  initial begin
    logic [3:0] sws [5];
    int cnt;
    sws = '{4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1111};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // stop the generator on code 0 (no noise)
    @(negedge clk);
    rng_run = 1;
    while (rng_state[2:0] != 3'd0) @(negedge clk);
    @(negedge clk);
    rng_run = 0;

    // time domain: tone through the regression stage
    cnt = 0;
    fork
      begin
        for (int n = 0; n < N; n++) begin
          @(negedge clk);
          adc_valid = 1;
          adc_code = 14'($rtoi($floor(6000.0 * $sin(2.0 * PI_R * 1.23e6 * n / 100.0e6) + 0.5)));
        end
        @(negedge clk);
        adc_valid = 0;
      end
      begin
        while (cnt < N) begin
          @(posedge clk);
          if (fft_xn_valid) begin
            xr[cnt] = real'(fft_xn_re);
            xi[cnt] = 0.0;
            cnt++;
          end
        end
      end
    join
    fft();
    for (int k = 0; k < N; k++) begin
      fr[k] = longint'($rtoi(xr[k] >= 0 ? xr[k] + 0.5 : xr[k] - 0.5));
      fi[k] = longint'($rtoi(xi[k] >= 0 ? xi[k] + 0.5 : xi[k] - 0.5));
    end

    for (int c = 0; c < 5; c++) begin
      real sum_err, ref_r, ref_i, hr, hi, e, mag, tone_err;
      int nb;
      nout = 0;
      @(negedge clk);
      sw_channel = sws[c];
      for (int k = 0; k < N; k++) begin
        fft_xk_valid = 1; fft_xk_index = 12'(k);
        fft_xk_re = 29'(fr[k]); fft_xk_im = 29'(fi[k]);
        @(negedge clk);
      end
      fft_xk_valid = 0;
      repeat (10) @(negedge clk);
      checks++;
      if (nout != N) begin failures++; $display("FAIL %0d outputs", nout); end
      sum_err = 0.0; nb = 0; tone_err = 0.0;
      for (int k = 0; k < N; k++) begin
        if (c == 0) begin hr = 1.0; hi = 0.0; end
        else chan_h(c - 1, k, N, hr, hi);
        ref_r = (real'(fr[k]) * hr - real'(fi[k]) * hi);
        ref_i = (real'(fr[k]) * hi + real'(fi[k]) * hr);
        mag = $sqrt(ref_r * ref_r + ref_i * ref_i);
        e = $sqrt((real'(outr[k]) - ref_r) ** 2 + (real'(outi[k]) - ref_i) ** 2);
        if (mag > 16384.0) begin
          sum_err += e / mag;
          nb++;
        end
        if (k == K0) tone_err = e / mag;
      end
      $display("channel code %b: tone bin error %0.4f %%, mean error %0.4f %% over %0d bins",
               sws[c], 100.0 * tone_err, 100.0 * sum_err / nb, nb);
      checks++;
      if (tone_err > 0.005) begin failures++; $display("FAIL tone error"); end
      checks++;
      if (nb == 0 || sum_err / nb > 0.01) begin failures++; $display("FAIL mean error"); end
      checks++;
      if (noise_code != 3'd0) begin failures++; $display("FAIL noise code %0d", noise_code); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
