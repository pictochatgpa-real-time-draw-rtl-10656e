// seven_seg: two-digit hexadecimal seven-segment display driver.
//
// Shows an 8-bit value as two hex digits on the left two digits of the
// board's multiplexed display; the design uses it to show the current colour
// index. The digits are lit in turn, each for REFRESH_CYCLES clock cycles
// (1 ms at 100 MHz). Anodes and segments are active low; seg[0] is segment a
// and seg[6] segment g. Multiplexing rate, polarities and segment order are
// this design's choice.
module seven_seg #(
  parameter int unsigned REFRESH_CYCLES = 100_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] value,
  output logic [1:0] an,
  output logic [6:0] seg
);
  localparam int unsigned CW = $clog2(REFRESH_CYCLES);

  logic [CW-1:0] count;
  logic          digit;   // 1: left (high nibble), 0: right (low nibble)
  logic [3:0]    nibble;
  logic [6:0]    seg_on;  // active-high pattern, bit 0 = a

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      digit <= 1'b0;
    end else if (count == CW'(REFRESH_CYCLES - 1)) begin
      count <= '0;
      digit <= ~digit;
    end else begin
      count <= count + 1'b1;
    end
  end

  always_comb begin
    nibble = digit ? value[7:4] : value[3:0];
    case (nibble)
      4'h0: seg_on = 7'b0111111;
      4'h1: seg_on = 7'b0000110;
      4'h2: seg_on = 7'b1011011;
      4'h3: seg_on = 7'b1001111;
      4'h4: seg_on = 7'b1100110;
      4'h5: seg_on = 7'b1101101;
      4'h6: seg_on = 7'b1111101;
      4'h7: seg_on = 7'b0000111;
      4'h8: seg_on = 7'b1111111;
      4'h9: seg_on = 7'b1101111;
      4'hA: seg_on = 7'b1110111;
      4'hB: seg_on = 7'b1111100;
      4'hC: seg_on = 7'b0111001;
      4'hD: seg_on = 7'b1011110;
      4'hE: seg_on = 7'b1111001;
      default: seg_on = 7'b1110001;
    endcase
    seg = ~seg_on;
    an  = digit ? 2'b01 : 2'b10;  // an[1] is the left digit
  end
endmodule
