// tb_nb_noise_lut - reads the whole table and checks each bin's magnitude against the
// noise model evaluated in the testbench, conjugate symmetry, that the phase varies
// from bin to bin like noise, and the one-clock read latency.
module tb_nb_noise_lut;
  import plc_ref_pkg::*;
  localparam int N = 4096;
  logic clk = 0, rd_en = 0;
  logic [11:0] bin = 0;
  logic signed [28:0] n_re, n_im;
  int checks = 0, failures = 0;
  int nneg = 0, nbig = 0;
  longint tr [N], ti [N];

  nb_noise_lut dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      real m, mm;
      @(negedge clk); bin = 12'(k); rd_en = 1;
      @(posedge clk); #1;
      tr[k] = longint'(n_re);
      ti[k] = longint'(n_im);
      m  = nb_mag(k, N) * 16384.0;
      mm = $sqrt(real'(tr[k]) * real'(tr[k]) + real'(ti[k]) * real'(ti[k]));
      checks++;
      if (mm > m + 1.5 || mm < m - 1.5) begin
        failures++;
        if (failures < 10) $display("FAIL bin %0d |N|=%f model %f", k, mm, m);
      end
      if (m > 100.0) begin
        nbig++;
        if (tr[k] < 0) nneg++;
      end
    end
    for (int k = 1; k < N / 2; k++) begin
      checks++;
      if (tr[k] != tr[N-k] || ti[k] != -ti[N-k]) failures++;
    end
    checks++;
    if (ti[0] != 0 || ti[N/2] != 0) failures++;
    // noise-like phase: real part negative for a fair share of the significant bins
    checks++;
    if (nbig < 8 || nneg * 5 < nbig || nneg * 5 > nbig * 4) begin
      failures++; $display("FAIL phase spread %0d of %0d", nneg, nbig);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
