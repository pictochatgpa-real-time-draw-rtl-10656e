// pictochat_top: one board of the two-board draw-sharing system.
//
// A finger on the capacitive panel raises the touch interrupt; `touch` reads
// the position over I2C (through `i2c_controller`) and the square at that
// position is painted on the local display in the current colour and brush
// size (`display_inputs` -> `display` -> SPI). Button 3 steps the colour
// (`color_select`, shown in hex on the seven-segment display), switch 15
// picks the brush (2x2 when high, 4x4 when low). Button 1 sends the last
// touched position and the colour to the Bluetooth module as a four-byte
// message (`bt_tx`); messages coming back from the other board through the
// Bluetooth module (`synchronizer` -> `bt_rx`) are painted the same way.
// Button 0 resets the design. All buttons pass through `debounce`.
//
// This wiring follows the design's block diagram. The power-on reset (a
// 4-bit shift register that relies on the FPGA's configuration-time initial
// value, hence the initialised declaration), the
// open-drain SDA split into `i2c_sda_in`/`i2c_sda_oe` (the pad is
// bidirectional: drive it low when `i2c_sda_oe` is 1, else release it) and
// the flow-control polarities are this design's choices: `ble_uart_rts` low
// means the Bluetooth module takes data, and `ble_uart_cts` is held low
// (ready) except in reset. Everything runs on the 100 MHz clock.
module pictochat_top
  import pictochat_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES   = 1_000_000,
  parameter int unsigned CLKS_PER_BAUD     = 868,
  parameter int unsigned I2C_FREQ          = 100_000,
  parameter int unsigned SPI_CLKS_PER_BIT  = 100,
  parameter int unsigned RESET_CYCLES      = 1_000,
  parameter int unsigned POST_RESET_CYCLES = 500_000,
  parameter int unsigned REFRESH_CYCLES    = 100_000
) (
  input  logic       clk,
  input  logic [3:0] btn,
  input  logic       sw15,
  // touchscreen (I2C)
  output logic       i2c_scl,
  input  logic       i2c_sda_in,
  output logic       i2c_sda_oe,
  input  logic       touch_irq_n,
  // display (SPI)
  output logic       spi_sclk,
  output logic       spi_mosi,
  output logic       spi_cs_n,
  output logic       spi_dc,
  output logic       lcd_rst_n,
  // Bluetooth module (UART)
  input  logic       ble_uart_rx,
  output logic       ble_uart_tx,
  input  logic       ble_uart_rts,
  output logic       ble_uart_cts,
  // seven-segment display
  output logic [1:0] ss_an,
  output logic [6:0] ss_seg
);
  // ---------------- reset and buttons ----------------
  logic [3:0] por_sr = '0;
  logic       por_rst, sys_rst;
  logic       btn0_clean, btn1_clean, btn3_clean;

  always_ff @(posedge clk) por_sr <= {por_sr[2:0], 1'b1};
  assign por_rst = !por_sr[3];

  debounce #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_db0 (
    .clk, .rst(por_rst), .btn_in(btn[0]), .btn_out(btn0_clean));

  always_ff @(posedge clk) sys_rst <= por_rst || btn0_clean;

  debounce #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_db1 (
    .clk, .rst(sys_rst), .btn_in(btn[1]), .btn_out(btn1_clean));
  debounce #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_db3 (
    .clk, .rst(sys_rst), .btn_in(btn[3]), .btn_out(btn3_clean));

  // ---------------- colour and brush ----------------
  color_e     color;
  logic [1:0] brush_space;

  color_select u_color (.clk, .rst(sys_rst), .btn(btn3_clean), .color);

  assign brush_space = sw15 ? 2'd1 : 2'd3;

  seven_seg #(.REFRESH_CYCLES(REFRESH_CYCLES)) u_seg (
    .clk, .rst(sys_rst), .value({6'd0, color}), .an(ss_an), .seg(ss_seg));

  // ---------------- touchscreen ----------------
  logic        i2c_valid, i2c_valid_out, i2c_ack_err;
  logic [7:0]  i2c_reg, i2c_data;
  logic [11:0] touch_x, touch_y;
  logic        touch_valid;

  i2c_controller #(.CLK_FREQ(CLK_FREQ_HZ), .I2C_FREQ(I2C_FREQ)) u_i2c (
    .clk, .rst(sys_rst),
    .valid_in(i2c_valid), .reg_addr(i2c_reg), .data_out(i2c_data),
    .valid_out(i2c_valid_out), .ack_err(i2c_ack_err), .busy(),
    .scl(i2c_scl), .sda_in(i2c_sda_in), .sda_oe(i2c_sda_oe));

  touch u_touch (
    .clk, .rst(sys_rst), .irq_n(touch_irq_n),
    .i2c_valid, .i2c_reg, .i2c_data, .i2c_valid_out, .i2c_ack_err,
    .x_out(touch_x), .y_out(touch_y), .valid_out(touch_valid));

  // ---------------- Bluetooth ----------------
  logic       rx_sync;
  logic [7:0] rx_x, rx_y;
  color_e     rx_color;
  logic       rx_valid;

  bt_tx #(.CLKS_PER_BAUD(CLKS_PER_BAUD)) u_bt_tx (
    .clk, .rst(sys_rst),
    .touch_valid, .touch_x(touch_x[7:0]), .touch_y(touch_y[7:0]), .color,
    .send(btn1_clean), .rts_n(ble_uart_rts), .busy(), .tx(ble_uart_tx));

  synchronizer u_sync (.clk, .rst(sys_rst), .d(ble_uart_rx), .q(rx_sync));

  bt_rx #(.CLKS_PER_BAUD(CLKS_PER_BAUD)) u_bt_rx (
    .clk, .rst(sys_rst), .rx(rx_sync),
    .x_out(rx_x), .y_out(rx_y), .color_out(rx_color), .valid_out(rx_valid),
    .resync());

  assign ble_uart_cts = sys_rst;

  // ---------------- display ----------------
  draw_req_t local_req, remote_req, draw_req;
  logic      draw_valid, display_ready;

  assign local_req  = '{x: touch_x[8:0], y: touch_y[8:0], color: color};
  assign remote_req = '{x: {1'b0, rx_x}, y: {1'b0, rx_y}, color: rx_color};

  display_inputs u_inputs (
    .clk, .rst(sys_rst),
    .local_valid(touch_valid), .local_req,
    .remote_valid(rx_valid), .remote_req,
    .display_ready, .draw_valid, .draw_req, .draw_is_remote(), .dropped());

  display #(
    .RESET_CYCLES(RESET_CYCLES), .POST_RESET_CYCLES(POST_RESET_CYCLES),
    .SPI_CLKS_PER_BIT(SPI_CLKS_PER_BIT)
  ) u_display (
    .clk, .rst(sys_rst),
    .valid_in(draw_valid), .x_in(draw_req.x), .y_in(draw_req.y),
    .color_in(draw_req.color), .space(brush_space),
    .ready(display_ready), .init_done(), .lcd_rst_n,
    .sclk(spi_sclk), .mosi(spi_mosi), .cs_n(spi_cs_n), .dc(spi_dc));
endmodule
