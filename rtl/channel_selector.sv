// channel_selector - decodes the user's four selector switches into the channel
// transfer function to apply.
//
// The switch code is a thermometer code:
//   0000 no transfer function          0111 150 m, bad characteristics
//   0001 150 m, good characteristics   1111 250 m, good characteristics
//   0011 150 m, medium characteristics
// These five codes are the published ones. Any other switch setting is this design's
// choice: it is treated as "no transfer function" and flagged on code_err. The
// decoded choice is registered when load is high; the emulator loads it at the first
// bin of every FFT frame so that a switch moved mid-frame never splits a spectrum
// between two channels.
//
// Interface: sw (asynchronous switches, assumed debounced and synchronised outside),
// load; tf_en/ch_sel/code_err one clock after load. Reset selects no transfer function.
module channel_selector (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [3:0] sw,
  output logic       tf_en,
  output logic [1:0] ch_sel,
  output logic       code_err
);

  logic       en_d, err_d;
  logic [1:0] sel_d;

  always_comb begin
    en_d  = 1'b1;
    err_d = 1'b0;
    sel_d = 2'd0;
    unique case (sw)
      4'b0000: en_d  = 1'b0;
      4'b0001: sel_d = 2'd0;
      4'b0011: sel_d = 2'd1;
      4'b0111: sel_d = 2'd2;
      4'b1111: sel_d = 2'd3;
      default: begin
        en_d  = 1'b0;
        err_d = 1'b1;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tf_en    <= 1'b0;
      ch_sel   <= 2'd0;
      code_err <= 1'b0;
    end else if (load) begin
      tf_en    <= en_d;
      ch_sel   <= sel_d;
      code_err <= err_d;
    end
  end

endmodule
