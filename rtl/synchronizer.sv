// synchronizer: two-stage flip-flop synchroniser for an asynchronous input.
//
// The received UART line from the Bluetooth module is passed through this
// before the receiver samples it, so that a metastable first stage has a
// full clock period to settle. The output lags the input by two clock
// cycles. The reset value is 1 (the idle level of a UART line); reset value
// and depth are this design's choice.
module synchronizer #(
  parameter logic RESET_VALUE = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RESET_VALUE;
      q    <= RESET_VALUE;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
