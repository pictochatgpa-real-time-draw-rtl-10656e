// uart_tx: byte-wide UART transmitter toward the Bluetooth module.
//
// Frame: one low start bit, eight data bits least significant first, one high
// stop bit, then a BUFFER period of 10 baud periods of idle-high line before
// the next byte may start; there is no parity bit. A byte therefore occupies
// 20 baud periods (17,360 clock cycles at 868 cycles per baud). The states
// (IDLE, START, DEVELOP, STOP, BUFFER), the bit order, the missing parity bit
// and the 10-period buffer follow the design description.
//
// Interface: a byte is accepted when `valid_in && ready`; it is copied into a
// holding register (one byte may wait while another is sent) and then into
// the shift buffer, so later changes of `data_in` cannot corrupt it. Every state
// change happens on a `baud_tick` from baud_gen, so each bit lasts exactly
// one baud period; a byte accepted between ticks starts on the next tick.
// `tx` is registered and idles high.
module uart_tx (
  input  logic       clk,
  input  logic       rst,
  input  logic       baud_tick,
  input  logic       valid_in,
  input  logic [7:0] data_in,
  output logic       ready,
  output logic       tx
);
  typedef enum logic [2:0] {IDLE, START, DEVELOP, STOP, BUFFER} state_e;

  localparam int unsigned BUFFER_BAUDS = 10;

  state_e     state;
  logic       pending;
  logic [7:0] hold;     // byte accepted, waiting for its start bit
  logic [7:0] buffer;   // byte being shifted out
  logic [3:0] count;

  assign ready = !pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IDLE;
      pending <= 1'b0;
      hold    <= '0;
      buffer  <= '0;
      count   <= '0;
      tx      <= 1'b1;
    end else begin
      if (valid_in && ready) begin
        pending <= 1'b1;
        hold    <= data_in;
      end
      if (baud_tick) begin
        unique case (state)
          IDLE: begin
            tx <= 1'b1;
            if (pending) begin
              pending <= 1'b0;
              buffer  <= hold;
              state   <= START;
              tx      <= 1'b0;
            end
          end
          START: begin
            state <= DEVELOP;
            count <= '0;
            tx    <= buffer[0];
          end
          DEVELOP: begin
            if (count == 4'd7) begin
              state <= STOP;
              tx    <= 1'b1;
            end else begin
              count <= count + 1'b1;
              tx    <= buffer[3'(count + 4'd1)];
            end
          end
          STOP: begin
            state <= BUFFER;
            count <= '0;
            tx    <= 1'b1;
          end
          BUFFER: begin
            tx <= 1'b1;
            if (count == 4'(BUFFER_BAUDS - 1)) begin
              // Back-to-back bytes: the next start bit follows at once,
              // so each byte takes exactly 20 baud periods.
              if (pending) begin
                pending <= 1'b0;
                buffer  <= hold;
                state   <= START;
                tx      <= 1'b0;
              end else begin
                state <= IDLE;
              end
            end else begin
              count <= count + 1'b1;
            end
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

  // The line is idle (high) whenever no frame is being sent.
  assert property (@(posedge clk) disable iff (rst) (state == IDLE) |-> tx)
    else $error("uart_tx: line low while idle");
endmodule
