// tb_plc_emulator_top - end-to-end test of the emulator datapath at full size (4096
// bins per frame, default parameters).
//
// The testbench plays the FFT core: it streams frames of bins (a strong tone near
// 1.23 MHz on random low-level bins, with occasional gaps in fft_xk_valid) into the
// design and plays the IFFT core by collecting ifft_xn_*. For every bin it predicts the
// output from the channel and noise table contents (whose values are checked against
// the channel and noise models by the blocks' own testbenches), the switch setting
// and noise code captured at the frame start, the complex product truncated to 14
// fractional bits and the saturating noise addition, and compares. It also checks the
// 5-clock latency, the frame-start marker, the ADC-side regression output, and counts
// the mechanisms exercised: every channel code, every noise code, the stopped and the
// running random generator, seed loading, a switch moved mid-frame, saturation, input
// gaps and both regression lines.
module tb_plc_emulator_top;
  localparam int N = 4096;

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
  int cyc = 0;

  // mechanism counters
  int n_ch [6];            // 0000, 0001, 0011, 0111, 1111, invalid
  int n_nz [8];
  int n_frozen = 0, n_running = 0, n_seed = 0, n_midswitch = 0, n_sat = 0, n_gap = 0;
  int n_lr_pos = 0, n_lr_neg = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- reference
  typedef struct { longint re, im; int k; int frame; } bin_t;
  bin_t in_q[$];

  function automatic longint sat29(longint v);
    if (v > 268435455)  return 268435455;
    if (v < -268435456) return -268435456;
    return v;
  endfunction

  function automatic logic [2:0] en_of(input logic [2:0] c);   // {imp, nb, bg}
    case (c)
      3'd0: return 3'b000;  3'd1: return 3'b100;  3'd2: return 3'b010;  3'd3: return 3'b001;
      3'd4: return 3'b101;  3'd5: return 3'b110;  3'd6: return 3'b011;  default: return 3'b111;
    endcase
  endfunction

  // channel index and enable for a switch code, -1 = no transfer function
  function automatic int ch_of(input logic [3:0] s);
    case (s)
      4'b0001: return 0;  4'b0011: return 1;  4'b0111: return 2;  4'b1111: return 3;
      default: return -1;
    endcase
  endfunction

  int frame_ch [64];
  logic [2:0] frame_code_exp [64];
  bit frame_code_known [64];
  logic [2:0] frame_code_seen [64];
  int frame_nout [64];

  // ---------------------------------------------------------------- output checker
  int first_in_cyc = -1, first_out_cyc = -1;

  always @(posedge clk) begin
    if (fft_xk_valid && first_in_cyc < 0) first_in_cyc = cyc;
    if (ifft_xn_valid) begin
      bin_t b;
      longint hr, hi, mr, mi, er, ei, sr, si;
      int ch;
      logic [2:0] code, en;
      if (first_out_cyc < 0) first_out_cyc = cyc;
      if (in_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        b = in_q.pop_front();
        ch = frame_ch[b.frame];
        if (ch < 0) begin hr = 16384; hi = 0; end
        else begin
          hr = longint'(dut.u_chlut.rom_re[ch * N + b.k]);
          hi = longint'(dut.u_chlut.rom_im[ch * N + b.k]);
        end
        mr = longint'(29'((b.re * hr - b.im * hi) >>> 14));
        mi = longint'(29'((b.re * hi + b.im * hr) >>> 14));
        if (b.k == 0) frame_code_seen[b.frame] = noise_code;
        code = frame_code_known[b.frame] ? frame_code_exp[b.frame] : frame_code_seen[b.frame];
        en = en_of(code);
        sr = mr + (en[2] ? longint'(dut.u_imp.rom_re[b.k]) : 0)
                + (en[1] ? longint'(dut.u_nb.rom_re[b.k]) : 0)
                + (en[0] ? longint'(dut.u_bg.rom_re[b.k]) : 0);
        si = mi + (en[2] ? longint'(dut.u_imp.rom_im[b.k]) : 0)
                + (en[1] ? longint'(dut.u_nb.rom_im[b.k]) : 0)
                + (en[0] ? longint'(dut.u_bg.rom_im[b.k]) : 0);
        er = sat29(sr);
        ei = sat29(si);
        checks++;
        if (longint'(ifft_xn_re) != er || longint'(ifft_xn_im) != ei || noise_code != code
            || ifft_xn_sof != (b.k == 0) || noise_sat != (er != sr || ei != si)) begin
          failures++;
          if (failures < 12)
            $display("FAIL frame %0d bin %0d out=%0d,%0d exp %0d,%0d code %0d exp %0d sof %b",
                     b.frame, b.k, ifft_xn_re, ifft_xn_im, er, ei, noise_code, code, ifft_xn_sof);
        end
        if (noise_sat) n_sat++;
        frame_nout[b.frame]++;
      end
    end
  end

  // ---------------------------------------------------------------- ADC side
  logic [13:0] lr_last;
  bit lr_pending = 0;
  always @(posedge clk) begin
    if (lr_pending) begin
      longint x, y;
      x = longint'({{2{lr_last[13]}}, lr_last});
      y = lr_last[13] ? 512 * x + 29360128 : 512 * x - 1279;
      checks++;
      if (!fft_xn_valid || longint'(lr_y_full) != y || fft_xn_re != 16'($signed(14'(y >>> 9)))) begin
        failures++;
        if (failures < 12) $display("FAIL regression code %h out %0d y %0d", lr_last, fft_xn_re, y);
      end
      if (lr_last[13]) n_lr_neg++; else n_lr_pos++;
    end
    lr_pending <= adc_valid;
    lr_last    <= adc_code;
  end

  always @(negedge clk) begin
    adc_valid <= rst_n && ($urandom_range(0, 3) != 0);
    adc_code  <= 14'($urandom);
  end

  // ---------------------------------------------------------------- stimulus
  // Run the generator until its random register holds the wanted code, then stop it.
  task automatic pick_noise(input logic [2:0] want);
    @(negedge clk);
    rng_run = 1;
    while (rng_state[2:0] != want) @(negedge clk);
    @(negedge clk);
    rng_run = 0;
    checks++;
    if (dut.u_rng.rnd != want) begin failures++; $display("FAIL rng stop"); end
  endtask

  task automatic send_frame(input int fr, input logic [3:0] sw, input bit gaps,
                            input bit midswitch, input bit full_scale);
    int ci;
    ci = ch_of(sw);
    frame_ch[fr] = ci;
    frame_nout[fr] = 0;
    case (sw)
      4'b0000: n_ch[0]++;  4'b0001: n_ch[1]++;  4'b0011: n_ch[2]++;
      4'b0111: n_ch[3]++;  4'b1111: n_ch[4]++;  default: n_ch[5]++;
    endcase
    @(negedge clk);
    sw_channel = sw;
    for (int k = 0; k < N; k++) begin
      bin_t b;
      if (gaps && $urandom_range(0, 9) == 0) begin
        fft_xk_valid = 0; n_gap++;
        @(negedge clk);
      end
      if (midswitch && k == 2000) begin
        sw_channel = (sw == 4'b1111) ? 4'b0001 : 4'b1111;
        n_midswitch++;
      end
      b.k = k; b.frame = fr;
      if (full_scale) begin
        b.re = ($urandom_range(0, 1) != 0) ? 268435455 : -268435456;
        b.im = ($urandom_range(0, 1) != 0) ? 268435455 : -268435456;
      end else if (k == 50 || k == N - 50) begin
        b.re = 30000000; b.im = (k == 50) ? -12000000 : 12000000;
      end else begin
        b.re = longint'($signed(21'($urandom)));
        b.im = longint'($signed(21'($urandom)));
      end
      fft_xk_valid = 1;
      fft_xk_index = 12'(k);
      fft_xk_re = 29'(b.re);
      fft_xk_im = 29'(b.im);
      in_q.push_back(b);
      @(negedge clk);
    end
    fft_xk_valid = 0;
  endtask

  task automatic drain();
    int t = 0;
    while (in_q.size() != 0 && t < 100) begin @(negedge clk); t++; end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    logic [3:0] sws [6];
    sws = '{4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1111, 4'b0101};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // eight frames with a stopped generator, one per noise code, cycling the channels
    for (int fr = 0; fr < 8; fr++) begin
      pick_noise(3'(fr));
      n_frozen++;
      frame_code_known[fr] = 1;
      frame_code_exp[fr] = 3'(fr);
      send_frame(fr, sws[fr % 6], fr >= 4, fr == 4 || fr == 5, 0);
      if (fr == 0) begin
        drain();
        checks++;
        if (first_out_cyc - first_in_cyc != 5) begin
          failures++; $display("FAIL latency %0d", first_out_cyc - first_in_cyc);
        end
      end
    end
    // running generator: the code is captured at the frame start and held for the frame
    drain();
    @(negedge clk);
    rng_seed = 32'hC0FF_EE11; rng_load_seed = 1;
    @(negedge clk);
    rng_load_seed = 0;
    checks++;
    if (rng_state != 32'hC0FF_EE11) begin failures++; $display("FAIL seed load"); end
    else n_seed++;
    for (int fr = 8; fr < 11; fr++) begin
      logic [31:0] s0;
      s0 = rng_state;
      rng_run = 1;
      frame_code_known[fr] = 0;
      send_frame(fr, sws[fr % 6], 1, 0, 0);
      checks++;
      if (rng_state == s0) begin failures++; $display("FAIL generator did not run"); end
      else n_running++;
    end
    drain();
    rng_run = 0;
    // full-scale bins without a channel: noise pushes some over the 29-bit range
    pick_noise(3'd7);
    frame_code_known[11] = 1;
    frame_code_exp[11] = 3'd7;
    send_frame(11, 4'b0000, 0, 0, 1);
    drain();

    for (int fr = 0; fr < 12; fr++) begin
      checks++;
      if (frame_nout[fr] != N) begin failures++; $display("FAIL frame %0d had %0d outputs", fr, frame_nout[fr]); end
    end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (n_ch[i] == 0) begin failures++; $display("FAIL channel code %0d never used", i); end
    end
    for (int fr = 0; fr < 12; fr++) n_nz[frame_code_known[fr] ? frame_code_exp[fr] : frame_code_seen[fr]]++;
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (n_nz[i] == 0) begin failures++; $display("FAIL noise code %0d never used", i); end
    end
    checks++; if (n_frozen == 0)    begin failures++; $display("FAIL no stopped-generator frame"); end
    checks++; if (n_running == 0)   begin failures++; $display("FAIL no running-generator frame"); end
    checks++; if (n_seed == 0)      begin failures++; $display("FAIL no seed load"); end
    checks++; if (n_midswitch == 0) begin failures++; $display("FAIL no mid-frame switch"); end
    checks++; if (n_sat == 0)       begin failures++; $display("FAIL no saturation"); end
    checks++; if (n_gap == 0)       begin failures++; $display("FAIL no input gap"); end
    checks++; if (n_lr_pos == 0 || n_lr_neg == 0) begin failures++; $display("FAIL regression branches"); end
    $display("mechanisms: channels %0d/%0d/%0d/%0d/%0d/%0d noise %0d %0d %0d %0d %0d %0d %0d %0d",
             n_ch[0], n_ch[1], n_ch[2], n_ch[3], n_ch[4], n_ch[5], n_nz[0], n_nz[1], n_nz[2],
             n_nz[3], n_nz[4], n_nz[5], n_nz[6], n_nz[7]);
    $display("stopped %0d running %0d seed %0d midswitch %0d saturated %0d gaps %0d regression +%0d -%0d",
             n_frozen, n_running, n_seed, n_midswitch, n_sat, n_gap, n_lr_pos, n_lr_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
