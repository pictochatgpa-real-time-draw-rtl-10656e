// uart_rx: byte-wide UART receiver for data arriving from the Bluetooth module.
//
// The receiver keeps its own baud counter so that it can align to the
// incoming frame. IDLE waits for the (already synchronised) line to go low;
// START waits half a baud period and, if the line is still low, accepts the
// start bit, so that every later sample lands in the middle of a bit. DEVELOP
// then samples eight data bits, least significant first, one baud period
// apart. PARITY lets the parity bit that the host sends pass unchecked.
// STOP samples the stop bit; if it is high the byte is presented on
// `data_out` with a one-cycle `valid_out` pulse, and the receiver returns to
// IDLE. A low stop bit (framing error) drops the byte.
//
// The state sequence, the half-bit alignment and the ignored parity bit
// follow the design description. Sampling the stop bit a full period after
// the parity bit, and dropping a byte on a framing error, are this design's
// choices. `valid_out` comes 10.5 baud periods after the start-bit edge
// (plus 1 cycle); HAS_PARITY = 0 removes the parity slot.
module uart_rx #(
  parameter int unsigned CLKS_PER_BAUD = 868,
  parameter bit          HAS_PARITY    = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] data_out,
  output logic       valid_out
);
  typedef enum logic [2:0] {IDLE, START, DEVELOP, PARITY, STOP} state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BAUD);

  state_e        state;
  logic [CW-1:0] count;
  logic [2:0]    nbits;
  logic [7:0]    shift;

  wire full_baud = (count == CW'(CLKS_PER_BAUD - 1));
  wire half_baud = (count == CW'(CLKS_PER_BAUD / 2 - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      count     <= '0;
      nbits     <= '0;
      shift     <= '0;
      data_out  <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      count     <= count + 1'b1;
      unique case (state)
        IDLE: begin
          count <= '0;
          if (!rx) state <= START;
        end
        START: begin
          if (half_baud) begin
            count <= '0;
            nbits <= '0;
            state <= rx ? IDLE : DEVELOP;
          end
        end
        DEVELOP: begin
          if (full_baud) begin
            count <= '0;
            shift <= {rx, shift[7:1]};
            nbits <= nbits + 1'b1;
            if (nbits == 3'd7) state <= HAS_PARITY ? PARITY : STOP;
          end
        end
        PARITY: begin
          if (full_baud) begin
            count <= '0;
            state <= STOP;
          end
        end
        STOP: begin
          if (full_baud) begin
            count <= '0;
            state <= IDLE;
            if (rx) begin
              data_out  <= shift;
              valid_out <= 1'b1;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
