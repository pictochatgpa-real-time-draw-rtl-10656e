// display: controller for the TFT display, built on spi_tx.
//
// States:
//   RESET  pulses the display's reset line low for RESET_CYCLES, then waits
//          POST_RESET_CYCLES for the display to come out of reset.
//   INIT   sends the 49 start-up bytes below (18 commands with their
//          parameters: display off, power and timing set-up, 16-bit pixel
//          format, display on).
//   IDLE   `ready` is high; a request (`valid_in`) is taken.
//   DRAW   paints a square whose top-left corner is (x_in, y_in) and whose
//          side is `space`+1 pixels: command 8'h2A with the first and last
//          x as two 16-bit values, command 8'h2B with the first and last y,
//          command 8'h2C, then the RGB565 colour (high byte first) once per
//          pixel. The display fills the window pixel by pixel.
//
// The state sequence, the start-up table and the window/fill commands follow
// the design description; so does `space` (1 gives a 2x2, 3 a 4x4 square).
// The description calls the 8'h2A bounds rows and the 8'h2B bounds columns;
// here 8'h2A carries x and 8'h2B carries y, which is how the display
// controller defines them. The reset pulse lengths are this design's choice.
//
// Timing: every byte costs 801 cycles in spi_tx. Start-up takes
// 49 x 801 cycles after the reset wait; a square takes
// (11 + 2(space+1)^2) bytes, 13 for a single pixel.
module display
  import pictochat_pkg::*;
#(
  parameter int unsigned RESET_CYCLES      = 1_000,
  parameter int unsigned POST_RESET_CYCLES = 500_000,
  parameter int unsigned SPI_CLKS_PER_BIT  = 100
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid_in,
  input  logic [8:0] x_in,
  input  logic [8:0] y_in,
  input  color_e     color_in,
  input  logic [1:0] space,
  output logic       ready,
  output logic       init_done,
  output logic       lcd_rst_n,
  output logic       sclk,
  output logic       mosi,
  output logic       cs_n,
  output logic       dc
);
  typedef enum logic [1:0] {RESET, INIT, IDLE, DRAW} state_e;

  localparam int unsigned INIT_LEN = 49;
  localparam int unsigned WAIT_MAX = (RESET_CYCLES > POST_RESET_CYCLES) ?
                                     RESET_CYCLES : POST_RESET_CYCLES;
  localparam int unsigned WW       = $clog2(WAIT_MAX + 1);

  // {dc, byte}: dc = 0 for a command, 1 for one of its parameters.
  localparam logic [8:0] INIT_ROM [INIT_LEN] = '{
    {1'b0, 8'h28},
    {1'b0, 8'hCF}, {1'b1, 8'h00}, {1'b1, 8'h83}, {1'b1, 8'h30},
    {1'b0, 8'hED}, {1'b1, 8'h64}, {1'b1, 8'h03}, {1'b1, 8'h12}, {1'b1, 8'h81},
    {1'b0, 8'hE8}, {1'b1, 8'h85}, {1'b1, 8'h01}, {1'b1, 8'h79},
    {1'b0, 8'hCB}, {1'b1, 8'h39}, {1'b1, 8'h2C}, {1'b1, 8'h00}, {1'b1, 8'h34},
    {1'b0, 8'hF7}, {1'b1, 8'h20},
    {1'b0, 8'hEA}, {1'b1, 8'h00}, {1'b1, 8'h00},
    {1'b0, 8'hC0}, {1'b1, 8'h26},
    {1'b0, 8'hC1}, {1'b1, 8'h11},
    {1'b0, 8'hC5}, {1'b1, 8'h35}, {1'b1, 8'h3E},
    {1'b0, 8'hC7}, {1'b1, 8'hBE},
    {1'b0, 8'h3A}, {1'b1, 8'h55},
    {1'b0, 8'hB1}, {1'b1, 8'h00},
    {1'b0, 8'h26}, {1'b1, 8'h01},
    {1'b0, 8'h51}, {1'b1, 8'hFF},
    {1'b0, 8'hB7}, {1'b1, 8'h07},
    {1'b0, 8'hB6}, {1'b1, 8'h0A}, {1'b1, 8'h82}, {1'b1, 8'h27}, {1'b1, 8'h00},
    {1'b0, 8'h29}
  };

  state_e      state;
  logic [WW-1:0] wait_count;
  logic        in_wait;      // RESET: 0 while the reset line is low, 1 after
  logic [5:0]  init_idx;
  logic [3:0]  step;         // 0..10: window commands; 11: pixels
  logic [5:0]  pix_bytes;    // pixel bytes still to send
  logic [15:0] x1, x2, y1, y2;
  logic [15:0] pixel;

  logic       spi_valid, spi_ready, spi_dc;
  logic [7:0] spi_data;

  spi_tx #(.CLKS_PER_BIT(SPI_CLKS_PER_BIT)) u_spi (
    .clk, .rst,
    .valid_in(spi_valid), .data_in(spi_data), .dc_in(spi_dc), .ready(spi_ready),
    .sclk, .mosi, .cs_n, .dc
  );

  // Next byte of the current state.
  always_comb begin
    spi_dc   = 1'b1;
    spi_data = 8'h00;
    if (state == INIT) begin
      {spi_dc, spi_data} = INIT_ROM[init_idx];
    end else begin
      unique case (step)
        4'd0:  begin spi_dc = 1'b0; spi_data = 8'h2A; end
        4'd1:  spi_data = x1[15:8];
        4'd2:  spi_data = x1[7:0];
        4'd3:  spi_data = x2[15:8];
        4'd4:  spi_data = x2[7:0];
        4'd5:  begin spi_dc = 1'b0; spi_data = 8'h2B; end
        4'd6:  spi_data = y1[15:8];
        4'd7:  spi_data = y1[7:0];
        4'd8:  spi_data = y2[15:8];
        4'd9:  spi_data = y2[7:0];
        4'd10: begin spi_dc = 1'b0; spi_data = 8'h2C; end
        default: spi_data = pix_bytes[0] ? pixel[7:0] : pixel[15:8];
      endcase
    end
  end

  assign spi_valid = ((state == INIT) || (state == DRAW)) && spi_ready;
  assign ready     = (state == IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= RESET;
      wait_count <= '0;
      in_wait    <= 1'b0;
      lcd_rst_n  <= 1'b0;
      init_done  <= 1'b0;
      init_idx   <= '0;
      step       <= '0;
      pix_bytes  <= '0;
      x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0;
      pixel      <= '0;
    end else begin
      unique case (state)
        RESET: begin
          init_idx   <= '0;
          wait_count <= wait_count + 1'b1;
          if (!in_wait && wait_count == WW'(RESET_CYCLES - 1)) begin
            lcd_rst_n  <= 1'b1;
            in_wait    <= 1'b1;
            wait_count <= '0;
          end else if (in_wait && wait_count == WW'(POST_RESET_CYCLES - 1)) begin
            state <= INIT;
          end
        end
        INIT: begin
          if (spi_valid) begin
            if (init_idx == 6'(INIT_LEN - 1)) begin
              state     <= IDLE;
              init_done <= 1'b1;
            end
            init_idx <= init_idx + 1'b1;
          end
        end
        IDLE: begin
          if (valid_in) begin
            x1        <= {7'd0, x_in};
            x2        <= {7'd0, x_in} + {14'd0, space};
            y1        <= {7'd0, y_in};
            y2        <= {7'd0, y_in} + {14'd0, space};
            pixel     <= rgb565(color_in);
            pix_bytes <= 6'({3'd0, space} + 6'd1) * 6'({3'd0, space} + 6'd1) * 6'd2;
            step      <= '0;
            state     <= DRAW;
          end
        end
        DRAW: begin
          if (spi_valid) begin
            if (step != 4'd11) begin
              step <= step + 1'b1;
            end else begin
              pix_bytes <= pix_bytes - 1'b1;
              if (pix_bytes == 6'd1) state <= IDLE;
            end
          end
        end
        default: state <= RESET;
      endcase
    end
  end
endmodule
