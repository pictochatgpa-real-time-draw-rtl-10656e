// lcd_model: behavioural model of the TFT display controller's SPI input,
// for testbenches only (not synthesizable).
//
// Bits are taken on the rising SCLK edge while chip select is low, most
// significant first; every eight bits form a byte tagged with the D/C level
// (0 command, 1 parameter). All bytes are kept in `log`. The model also acts
// on the window commands: 8'h2A takes the first and last x, 8'h2B the first
// and last y (16-bit values, high byte first), and after 8'h2C each pair of
// bytes is one RGB565 pixel, written into `fb` left to right, top to bottom
// inside the window. `resets` counts low pulses on the reset line and
// `fills` counts 8'h2C commands.
module lcd_model (
  input logic sclk,
  input logic mosi,
  input logic cs_n,
  input logic dc,
  input logic rst_n
);
  logic [8:0]  log [$];
  logic [15:0] fb [int];
  int          resets = 0;
  int          fills  = 0;
  int          pixels = 0;

  logic [7:0]  cmd = 8'h00;
  int          nparam = 0;
  logic [15:0] xs, xe, ys, ye, cx, cy;
  logic [7:0]  hi;
  logic [7:0]  sh;
  int          nbit = 0;

  always @(negedge rst_n) resets++;
  always @(posedge cs_n) nbit = 0;

  function automatic logic [15:0] pixel_at(int x, int y);
    if (fb.exists(y * 1024 + x)) return fb[y * 1024 + x];
    return 16'hDEAD;
  endfunction

  task automatic take(input logic d, input logic [7:0] b);
    log.push_back({d, b});
    if (!d) begin
      cmd = b; nparam = 0;
      if (b == 8'h2C) begin fills++; cx = xs; cy = ys; end
    end else begin
      case (cmd)
        8'h2A: case (nparam)
                 0: xs[15:8] = b; 1: xs[7:0] = b; 2: xe[15:8] = b; default: xe[7:0] = b;
               endcase
        8'h2B: case (nparam)
                 0: ys[15:8] = b; 1: ys[7:0] = b; 2: ye[15:8] = b; default: ye[7:0] = b;
               endcase
        8'h2C: if (nparam % 2 == 0) hi = b;
               else begin
                 fb[int'(cy) * 1024 + int'(cx)] = {hi, b};
                 pixels++;
                 if (cx == xe) begin cx = xs; cy = cy + 16'd1; end
                 else cx = cx + 16'd1;
               end
        default: ;
      endcase
      nparam++;
    end
  endtask

  always @(posedge sclk) if (!cs_n) begin
    sh = {sh[6:0], mosi};
    nbit++;
    if (nbit == 8) begin
      nbit = 0;
      take(dc, sh);
    end
  end
endmodule
