// tb_lfsr_rng - checks the generator against a bit-level model (left shift, new LSB =
// bit31 ^ bit29 ^ bit2), the reset seed, seed loading, the zero-seed guard, the enable
// (stop) input and that all eight noise codes appear.
module tb_lfsr_rng;
  logic clk = 0, rst_n = 0, en = 0, load_seed = 0;
  logic [31:0] seed = '0, state;
  logic [2:0] rnd;
  int checks = 0, failures = 0;
  logic [31:0] m;
  logic [2:0]  mr;
  bit seen [8];

  lfsr_rng dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_model(input bit e, input bit ld, input logic [31:0] sd);
    logic [31:0] n;
    if (e) mr = m[2:0];
    n = {m[30:0], m[31] ^ m[29] ^ m[2]};
    if (ld)     m = (sd == 0) ? 32'h1D87_2B41 : sd;
    else if (e) m = (n == 0) ? 32'h1D87_2B41 : n;
  endtask

  task automatic cyc(input bit e, input bit ld, input logic [31:0] sd);
    @(negedge clk); en = e; load_seed = ld; seed = sd;
    @(posedge clk); #1;
    step_model(e, ld, sd);
    checks++;
    if (state != m || rnd != mr) begin
      failures++;
      $display("FAIL state=%h exp %h rnd=%0d exp %0d", state, m, rnd, mr);
    end
    seen[rnd] = 1;
  endtask

  initial begin
    m = 32'h1D87_2B41; mr = 0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (state != 32'h1D87_2B41 || rnd != 0) failures++;
    rst_n = 1;
    for (int i = 0; i < 3000; i++) cyc(1, 0, 0);
    for (int i = 0; i < 20; i++)   cyc(0, 0, 0);   // stopped: must hold
    cyc(0, 1, 32'hDEAD_BEEF);
    for (int i = 0; i < 500; i++)  cyc($urandom_range(0, 3) != 0, 0, 0);
    cyc(1, 1, 32'h0);                              // zero seed replaced
    for (int i = 0; i < 200; i++)  cyc(1, 0, 0);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (!seen[i]) begin failures++; $display("FAIL code %0d never produced", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
