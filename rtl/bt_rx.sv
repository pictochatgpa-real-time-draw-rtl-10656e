// bt_rx: Bluetooth packet receiver.
//
// Bytes from the UART receiver are collected in the order the sender uses:
// colour index, y, x, then the terminator 8'h0A. When the fourth byte is the
// terminator, the three values are presented with a one-cycle `valid_out`
// pulse. Counting positions (rather than searching for 8'h0A) lets a
// coordinate equal to 8'h0A pass. If the fourth byte is not the terminator
// the receiver has lost its place: it then drops bytes up to and including
// the next 8'h0A and starts a new message after it. The four-byte layout and
// the terminator follow the design description; the position counting and
// the resynchronisation rule are this design's choices.
//
// `rx` must already be synchronised to `clk`. `valid_out` follows the middle
// of the terminator's stop bit by two cycles.
module bt_rx
  import pictochat_pkg::*;
#(
  parameter int unsigned CLKS_PER_BAUD = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] x_out,
  output logic [7:0] y_out,
  output color_e     color_out,
  output logic       valid_out,
  output logic       resync      // pulses when a malformed message is dropped
);
  logic [7:0] byte_data;
  logic       byte_valid;
  logic [1:0] pos;
  logic       hunting;
  logic [1:0] c_q;
  logic [7:0] y_q, x_q;

  uart_rx #(.CLKS_PER_BAUD(CLKS_PER_BAUD)) u_uart (
    .clk, .rst, .rx, .data_out(byte_data), .valid_out(byte_valid)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pos       <= '0;
      hunting   <= 1'b0;
      c_q       <= '0;
      y_q       <= '0;
      x_q       <= '0;
      x_out     <= '0;
      y_out     <= '0;
      color_out <= COLOR_BLACK;
      valid_out <= 1'b0;
      resync    <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      resync    <= 1'b0;
      if (byte_valid) begin
        if (hunting) begin
          if (byte_data == PKT_END) hunting <= 1'b0;
        end else begin
          unique case (pos)
            2'd0: c_q <= byte_data[1:0];
            2'd1: y_q <= byte_data;
            2'd2: x_q <= byte_data;
            default: begin
              if (byte_data == PKT_END) begin
                x_out     <= x_q;
                y_out     <= y_q;
                color_out <= color_e'(c_q);
                valid_out <= 1'b1;
              end else begin
                hunting <= 1'b1;
                resync  <= 1'b1;
              end
            end
          endcase
          pos <= pos + 1'b1;
        end
      end
    end
  end
endmodule
