// tb_imp_noise_lut - reads the whole impulsive noise table and compares every bin with
// the burst-train spectrum evaluated in the testbench (within one LSB), checks
// conjugate symmetry, the DC value (sum of burst amplitudes, here zero) and the
// one-clock read latency.
module tb_imp_noise_lut;
  import plc_ref_pkg::*;
  localparam int N = 4096;
  logic clk = 0, rd_en = 0;
  logic [11:0] bin = 0;
  logic signed [28:0] n_re, n_im;
  int checks = 0, failures = 0;
  longint tr [N], ti [N];
  int nbig = 0;

  imp_noise_lut dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint absl(longint v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      real sr, si;
      @(negedge clk); bin = 12'(k); rd_en = 1;
      @(posedge clk); #1;
      tr[k] = longint'(n_re);
      ti[k] = longint'(n_im);
      imp_spec(k, N, sr, si);
      checks++;
      if (absl(tr[k] - q14(sr)) > 1 || absl(ti[k] - q14(si)) > 1) begin
        failures++;
        if (failures < 10) $display("FAIL bin %0d n=%0d,%0d model %0d,%0d", k, n_re, n_im,
                                    q14(sr), q14(si));
      end
      if (absl(tr[k]) > 1000) nbig++;
    end
    for (int k = 1; k < N / 2; k++) begin
      checks++;
      if (tr[k] != tr[N-k] || ti[k] != -ti[N-k]) failures++;
    end
    checks++;
    if (tr[0] != 0 || ti[0] != 0 || ti[N/2] != 0) begin failures++; $display("FAIL DC"); end
    checks++;
    if (nbig < 100) begin failures++; $display("FAIL spectrum too narrow: %0d", nbig); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
