// bt_tx: Bluetooth packet sender.
//
// One drawing event does not fit in one UART byte, so a message is four bytes
// sent in this order: colour index, y, x, and the newline character 8'h0A that
// tells the far side the message is complete. The block keeps the position of
// the most recent local touch (low 8 bits of each coordinate); a rising edge
// on `send` (debounced button 1) copies {colour, y, x, 8'h0A} into a four-entry
// array and feeds it to uart_tx byte by byte. Presses while a message is still
// going out are ignored. The byte order, the terminator and sending only on a
// button press follow the design description.
//
// Flow control: a byte is handed to the transmitter only while `rts_n` is low
// (the Bluetooth module ready to take data); the polarity is this design's
// choice. With the line ready a message takes 4 x 20 = 80 baud periods.
module bt_tx
  import pictochat_pkg::*;
#(
  parameter int unsigned CLKS_PER_BAUD = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       touch_valid,
  input  logic [7:0] touch_x,
  input  logic [7:0] touch_y,
  input  color_e     color,
  input  logic       send,
  input  logic       rts_n,
  output logic       busy,
  output logic       tx
);
  logic       baud_tick;
  logic       send_q;
  logic [7:0] last_x, last_y;
  logic [7:0] msg [4];
  logic [2:0] idx;          // next byte to hand over; 4 = done
  logic       byte_valid, byte_ready;

  baud_gen #(.CLKS_PER_BAUD(CLKS_PER_BAUD)) u_baud (
    .clk, .rst, .tick(baud_tick)
  );

  uart_tx u_uart (
    .clk, .rst, .baud_tick,
    .valid_in(byte_valid), .data_in(msg[idx[1:0]]), .ready(byte_ready), .tx
  );

  assign byte_valid = !idx[2] && !rts_n;
  // Busy until the last byte has left the transmitter's holding register.
  assign busy       = !idx[2] || !byte_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      send_q <= 1'b0;
      last_x <= '0;
      last_y <= '0;
      idx    <= 3'd4;
      for (int i = 0; i < 4; i++) msg[i] <= '0;
    end else begin
      send_q <= send;
      if (touch_valid) begin
        last_x <= touch_x;
        last_y <= touch_y;
      end
      if (send && !send_q && idx[2]) begin
        msg[0] <= {6'd0, color};
        msg[1] <= last_y;
        msg[2] <= last_x;
        msg[3] <= PKT_END;
        idx    <= 3'd0;
      end else if (byte_valid && byte_ready) begin
        idx <= idx + 1'b1;
      end
    end
  end
endmodule
