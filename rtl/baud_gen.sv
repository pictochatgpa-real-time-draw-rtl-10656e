// baud_gen: baud-rate tick generator for the UART transmitter.
//
// Runs on the 100 MHz system clock (so no second clock domain is needed) and
// raises `tick` for exactly one cycle every CLKS_PER_BAUD cycles:
// 100,000,000 / 115,200 = 868 (rounded down), as in the design description.
// The first tick comes CLKS_PER_BAUD cycles after reset.
module baud_gen #(
  parameter int unsigned CLKS_PER_BAUD = 868
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned CW = $clog2(CLKS_PER_BAUD);

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (count == CW'(CLKS_PER_BAUD - 1)) begin
      count <= '0;
      tick  <= 1'b1;
    end else begin
      count <= count + 1'b1;
      tick  <= 1'b0;
    end
  end
endmodule
