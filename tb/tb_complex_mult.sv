// tb_complex_mult - checks the FOIL complex product against 64-bit integer arithmetic,
// the truncation to 14 fractional bits, the two-clock latency and back-to-back
// throughput, including the most negative operand values.
module tb_complex_mult;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [28:0] a = 0, b = 0, c = 0, d = 0, p_re, p_im;
  int checks = 0, failures = 0;

  complex_mult dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { longint re, im; } exp_t;
  exp_t q[$];
  int cyc = 0, last_in = -1;
  int lat_seen = 0;

  function automatic exp_t model(longint aa, longint bb, longint cc, longint dd);
    exp_t e;
    longint r, i;
    r = aa * cc - bb * dd;
    i = aa * dd + bb * cc;
    e.re = longint'(29'(r >>> 14));
    e.im = longint'(29'(i >>> 14));
    return e;
  endfunction

  function automatic logic signed [28:0] pick(input int mode);
    case (mode)
      0: return 29'sh1000_0000;        // most negative
      1: return 29'sh0FFF_FFFF;        // most positive
      2: return 29'sd16384;            // 1.0
      3: return -29'sd16384;
      default: return 29'($urandom);
    endcase
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      exp_t e;
      checks++;
      e = q.pop_front();
      if (longint'(p_re) != e.re || longint'(p_im) != e.im) begin
        failures++;
        $display("FAIL re=%0d exp %0d im=%0d exp %0d", p_re, e.re, p_im, e.im);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency: single sample, count clocks until out_valid
    @(negedge clk);
    a = 29'sd100000; b = -29'sd5000; c = 29'sd8192; d = 29'sd4096; in_valid = 1;
    q.push_back(model(a, b, c, d));
    @(negedge clk); in_valid = 0;
    begin
      int n = 1;
      while (!out_valid && n < 10) begin @(negedge clk); n++; end
      checks++;
      if (n != 2) begin failures++; $display("FAIL latency %0d", n); end
    end
    // streaming, one per clock
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a = pick($urandom_range(0, 12)); b = pick($urandom_range(0, 12));
      c = pick($urandom_range(0, 12)); d = pick($urandom_range(0, 12));
      if (i % 3 == 0) begin c = c >>> 14; d = d >>> 14; end   // channel-sized gains
      in_valid = ($urandom_range(0, 7) != 0);
      if (in_valid) q.push_back(model(a, b, c, d));
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
