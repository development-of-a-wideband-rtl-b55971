// tb_channel_lut - reads every bin of the four channel tables and compares them with
// the multipath model evaluated in the testbench (within one LSB), checks hand-worked
// DC values, conjugate symmetry, the "no transfer function" value 1.0 and the
// one-clock read latency.
module tb_channel_lut;
  import plc_ref_pkg::*;
  localparam int N = 4096;
  logic clk = 0, rd_en = 0, tf_en = 1;
  logic [1:0] ch_sel = 0;
  logic [11:0] bin = 0;
  logic signed [28:0] h_re, h_im;
  int checks = 0, failures = 0;
  longint tab_re [4][N], tab_im [4][N];

  channel_lut dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint absl(longint v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    // DC gains: sum of path gains (a0 = 0) in Q15.14, worked by hand
    longint dc [4];
    dc = '{1507, 1458, 1868, 1966};
    repeat (2) @(posedge clk);
    for (int ch = 0; ch < 4; ch++) begin
      for (int k = 0; k < N; k++) begin
        real hr, hi;
        @(negedge clk);
        ch_sel = 2'(ch); bin = 12'(k); rd_en = 1; tf_en = 1;
        @(posedge clk); #1;
        tab_re[ch][k] = longint'(h_re);
        tab_im[ch][k] = longint'(h_im);
        chan_h(ch, k, N, hr, hi);
        checks++;
        if (absl(tab_re[ch][k] - q14(hr)) > 1 || absl(tab_im[ch][k] - q14(hi)) > 1) begin
          failures++;
          if (failures < 10) $display("FAIL ch%0d bin%0d h=%0d,%0d model %0d,%0d", ch, k,
                                      h_re, h_im, q14(hr), q14(hi));
        end
      end
      checks++;
      if (tab_re[ch][0] != dc[ch] || tab_im[ch][0] != 0) begin
        failures++; $display("FAIL ch%0d DC %0d", ch, tab_re[ch][0]);
      end
      for (int k = 1; k < N / 2; k++) begin
        checks++;
        if (tab_re[ch][k] != tab_re[ch][N-k] || tab_im[ch][k] != -tab_im[ch][N-k]) failures++;
      end
    end
    // no transfer function
    @(negedge clk); tf_en = 0; bin = 12'd77; ch_sel = 2'd2;
    @(posedge clk); #1;
    checks++;
    if (h_re != 29'sd16384 || h_im != 0) begin failures++; $display("FAIL unity"); end
    // rd_en low holds the output
    @(negedge clk); tf_en = 1; rd_en = 0;
    @(posedge clk); #1;
    checks++;
    if (h_re != 29'sd16384) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
