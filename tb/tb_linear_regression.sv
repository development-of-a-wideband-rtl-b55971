// tb_linear_regression - checks the code-to-amplitude fit: both line equations,
// selection by the sign bit, the truncated output and the one-clock latency.
module tb_linear_regression;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [13:0] adc_code = '0;
  logic signed [26:0] y_full;
  logic signed [13:0] y_out;
  int checks = 0, failures = 0;
  int npos = 0, nneg = 0;

  linear_regression dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_y(input logic [13:0] c);
    longint x;
    x = longint'({{2{c[13]}}, c});           // 16-bit word read as unsigned
    return c[13] ? 512 * x + 29360128 : 512 * x - 1279;
  endfunction

  task automatic apply(input logic [13:0] c);
    longint e;
    @(negedge clk);
    adc_code = c;
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    e = ref_y(c);
    checks++;
    if (!out_valid || longint'(y_full) != e || y_out != 14'(e >>> 9)) begin
      failures++;
      $display("FAIL code=%h y_full=%0d exp=%0d y_out=%h valid=%b", c, y_full, e, y_out, out_valid);
    end
    if (c[13]) nneg++; else npos++;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid held"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // worked examples
    apply(14'h0000);  // Y = -1279
    checks++; if (y_full != -27'sd1279) failures++;
    apply(14'h0001);  // Y = 512 - 1279 = -767
    apply(14'h1FFF);  // largest positive
    apply(14'h2000);  // most negative: x = 0xE000, Y = 2*29360128
    checks++; if (y_full != 27'sd58720256) failures++;
    apply(14'h3FFF);
    for (int i = 0; i < 300; i++) apply(14'($urandom));
    checks++;
    if (npos == 0 || nneg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
