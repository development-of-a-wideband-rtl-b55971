// tb_noise_selector - checks the noise combination table for all eight codes, the
// saturating addition, the capture of the code at the frame's first bin and the
// one-clock latency.
module tb_noise_selector;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  logic [2:0] code = '0;
  logic signed [28:0] s_re = 0, s_im = 0, imp_re = 0, imp_im = 0, nb_re = 0, nb_im = 0,
                      bg_re = 0, bg_im = 0, y_re, y_im;
  logic out_valid, sat;
  logic [2:0] code_used;
  int checks = 0, failures = 0, nsat = 0;
  bit code_seen [8];

  noise_selector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat29(longint v, output bit s);
    s = 0;
    if (v > 268435455)  begin s = 1; return 268435455; end
    if (v < -268435456) begin s = 1; return -268435456; end
    return v;
  endfunction

  // enables: {imp, nb, bg}
  function automatic logic [2:0] en_of(input logic [2:0] c);
    case (c)
      3'd0: return 3'b000;
      3'd1: return 3'b100;
      3'd2: return 3'b010;
      3'd3: return 3'b001;
      3'd4: return 3'b101;
      3'd5: return 3'b110;
      3'd6: return 3'b011;
      default: return 3'b111;
    endcase
  endfunction

  function automatic logic signed [28:0] rnd29(input bit big);
    return big ? 29'($urandom) : 29'($signed(20'($urandom)));
  endfunction

  logic [2:0] frame_code;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 40; fr++) begin
      frame_code = 3'(fr);
      for (int k = 0; k < 16; k++) begin
        longint er, ei;
        bit sr, si;
        logic [2:0] en;
        @(negedge clk);
        in_valid = 1;
        in_sof   = (k == 0);
        code     = (k == 0) ? frame_code : 3'($urandom);   // later codes must be ignored
        s_re = rnd29(fr >= 16); s_im = rnd29(fr >= 16);
        imp_re = rnd29(fr >= 24); imp_im = rnd29(fr >= 24);
        nb_re = rnd29(fr >= 24); nb_im = rnd29(fr >= 24);
        bg_re = rnd29(fr >= 24); bg_im = rnd29(fr >= 24);
        en = en_of(frame_code);
        er = longint'(s_re) + (en[2] ? longint'(imp_re) : 0) + (en[1] ? longint'(nb_re) : 0)
             + (en[0] ? longint'(bg_re) : 0);
        ei = longint'(s_im) + (en[2] ? longint'(imp_im) : 0) + (en[1] ? longint'(nb_im) : 0)
             + (en[0] ? longint'(bg_im) : 0);
        er = sat29(er, sr);
        ei = sat29(ei, si);
        @(posedge clk); #1;
        checks++;
        if (!out_valid || longint'(y_re) != er || longint'(y_im) != ei || sat != (sr || si)
            || code_used != frame_code) begin
          failures++;
          $display("FAIL fr=%0d k=%0d y=%0d,%0d exp %0d,%0d sat=%b code=%0d", fr, k, y_re, y_im,
                   er, ei, sat, code_used);
        end
        if (sat) nsat++;
        code_seen[code_used] = 1;
        if ($urandom_range(0, 4) == 0) begin
          @(negedge clk); in_valid = 0; in_sof = 0; code = 3'($urandom);
        end
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (!code_seen[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
