// color_select: drawing-colour selector driven by button 3.
//
// Every press (rising edge of the debounced button) steps the colour index
// through black, white, red, blue and back to black; reset selects black.
// The index is used both for local drawing and in the Bluetooth packet, and
// is shown on the seven-segment display. The order and the default follow the
// design description; edge detection is this design's choice. The new colour
// is visible one cycle after the button edge is seen.
module color_select
  import pictochat_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   btn,
  output color_e color
);
  logic btn_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      btn_q <= 1'b0;
      color <= COLOR_BLACK;
    end else begin
      btn_q <= btn;
      if (btn && !btn_q) color <= color_e'(color + 2'd1);
    end
  end
endmodule
