// linear_regression - maps the ADC's two's complement sample code to the fixed-point
// amplitude fed to the FFT.
//
// The ADC delivers a 14-bit two's complement code. The FPGA-side FIFO widens it to a
// 16-bit word by sign extension, and that word, read as an unsigned number x, is the
// input of two straight-line fits of amplitude against code:
//   MSB = 0 (positive sample):  Y = 512*x - 1279
//   MSB = 1 (negative sample):  Y = 512*x + 29360128
// The line is chosen by the sample's most significant bit. Y is kept exactly in a
// 27-bit signed register (y_full) and then truncated: the OUT_W bits starting at bit
// TRUNC_LSB are passed on (y_out). The slopes, offsets and the 14-bit truncated width
// are the published ones; the 16-bit FIFO word, the truncation position (bit 9, which
// undoes the 512 = 2^9 slope) and the one-cycle register are this design's choices.
// With the published negative offset, a negative code leaves the truncation with its
// top bit inverted (offset binary), while a positive code keeps two's complement; the
// constants are parameters so that a recalibrated fit can be dropped in.
//
// Interface: in_valid/adc_code in, out_valid/y_full/y_out one clock later. No stall.
module linear_regression #(
  parameter int unsigned ADC_W      = 14,        // ADC code width
  parameter int unsigned X_W        = 16,        // FIFO word width (sign-extended code)
  parameter int          POS_SLOPE  = 512,
  parameter int          POS_OFFSET = -1279,
  parameter int          NEG_SLOPE  = 512,
  parameter int          NEG_OFFSET = 29360128,
  parameter int unsigned Y_W        = 27,        // exact width of Y
  parameter int unsigned TRUNC_LSB  = 9,
  parameter int unsigned OUT_W      = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [ADC_W-1:0]        adc_code,
  output logic                    out_valid,
  output logic signed [Y_W-1:0]   y_full,
  output logic signed [OUT_W-1:0] y_out
);

  logic [X_W-1:0]        x_word;
  logic signed [Y_W-1:0] x_ext;
  logic signed [Y_W-1:0] y_next;

  always_comb begin
    x_word = {{(X_W-ADC_W){adc_code[ADC_W-1]}}, adc_code};
    x_ext  = Y_W'($signed({1'b0, x_word}));
    if (adc_code[ADC_W-1])
      y_next = x_ext * Y_W'(NEG_SLOPE) + Y_W'(NEG_OFFSET);
    else
      y_next = x_ext * Y_W'(POS_SLOPE) + Y_W'(POS_OFFSET);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_full    <= '0;
      y_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y_full <= y_next;
        y_out  <= y_next[TRUNC_LSB +: OUT_W];
      end
    end
  end

endmodule
