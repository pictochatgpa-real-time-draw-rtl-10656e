// pictochat_pkg: types and constants shared by the draw-sharing design.
//
// A drawing colour is a two-bit index into four fixed RGB565 values
// (black, white, red, blue; black after reset). A draw request carries the
// screen position and the colour index. The end-of-message marker of the
// Bluetooth packet, 8'h0A, and the system clock rate (100 MHz) follow the
// design description; the RGB565 codes and the touch controller's I2C
// address are this design's own choices.
package pictochat_pkg;

  localparam int unsigned CLK_FREQ_HZ = 100_000_000;

  typedef enum logic [1:0] {
    COLOR_BLACK = 2'd0,
    COLOR_WHITE = 2'd1,
    COLOR_RED   = 2'd2,
    COLOR_BLUE  = 2'd3
  } color_e;

  // One request to paint a square of the screen.
  typedef struct packed {
    logic [8:0] x;
    logic [8:0] y;
    color_e     color;
  } draw_req_t;

  localparam logic [7:0] PKT_END = 8'h0A;

  // RGB565 pixel value sent to the display for a colour index.
  function automatic logic [15:0] rgb565(color_e c);
    case (c)
      COLOR_BLACK: return 16'h0000;
      COLOR_WHITE: return 16'hFFFF;
      COLOR_RED:   return 16'hF800;
      default:     return 16'h001F;
    endcase
  endfunction

endpackage
