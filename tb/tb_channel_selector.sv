// tb_channel_selector - checks the selector switch decoding for all 16 settings and
// that a new setting is taken only when load is high.
module tb_channel_selector;
  logic clk = 0, rst_n = 0, load = 0;
  logic [3:0] sw = '0;
  logic tf_en, code_err;
  logic [1:0] ch_sel;
  int checks = 0, failures = 0;

  channel_selector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (tf_en !== 1'b0) failures++;
    rst_n = 1;
    for (int s = 0; s < 16; s++) begin
      logic e_en, e_err;
      logic [1:0] e_sel;
      e_en = 1'b1; e_err = 1'b0; e_sel = 2'd0;
      case (s)
        0:  e_en = 1'b0;
        1:  e_sel = 2'd0;
        3:  e_sel = 2'd1;
        7:  e_sel = 2'd2;
        15: e_sel = 2'd3;
        default: begin e_en = 1'b0; e_err = 1'b1; end
      endcase
      @(negedge clk); sw = 4'(s); load = 1;
      @(negedge clk); load = 0;
      checks++;
      if (tf_en != e_en || code_err != e_err || (e_en && ch_sel != e_sel)) begin
        failures++;
        $display("FAIL sw=%b en=%b sel=%0d err=%b", sw, tf_en, ch_sel, code_err);
      end
    end
    // hold without load
    @(negedge clk); sw = 4'b0111; load = 1;
    @(negedge clk); load = 0; sw = 4'b0001;
    repeat (3) @(negedge clk);
    checks++;
    if (ch_sel != 2'd2 || !tf_en) begin failures++; $display("FAIL selection changed without load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
