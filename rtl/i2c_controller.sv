// i2c_controller: I2C master that reads one register of the touch controller.
//
// A read is two I2C transfers. The first writes the register address: START,
// the 7-bit device address with the write bit (0), an acknowledge slot, the
// 8-bit register address, an acknowledge slot, STOP. After a one-bit BUFFER
// pause the second transfer reads the data: START, the device address with the
// read bit (1), an acknowledge slot, eight data bits received from the device,
// an acknowledge bit (low) driven by this master, STOP. The states
// IDLE, START, SEND_ADDRESS, SET_DATA_ADDRESS, END, BUFFER, START2,
// SEND_ADDRESS2, RECEIVE_DATA and END2, the start/stop sequences and the
// master's acknowledge after the data byte follow the design description.
//
// Timing: each bit slot, and each START, STOP and BUFFER step, is one SCL
// period (CLK_FREQ / I2C_FREQ = 1000 cycles at 100 kHz), split into four
// quarters. SCL is low in quarters 0-1 and high in quarters 2-3; SDA changes
// at the start of quarter 0 and is sampled at the end of quarter 2. A read
// takes 41 slots, i.e. 41,000 cycles from `valid_in` to `valid_out`.
//
// SDA is open drain: `sda_oe` = 1 pulls the line low, 0 releases it to the
// pull-up; `sda_in` is the level on the pad. If an acknowledge slot reads
// high (no acknowledge) the transfer is ended with STOP at once and
// `ack_err` pulses instead of `valid_out`; that abort path, the device
// address 7'h38 and the quarter-period scheme are this design's choices.
module i2c_controller #(
  parameter int unsigned CLK_FREQ = 100_000_000,
  parameter int unsigned I2C_FREQ = 100_000,
  parameter logic [6:0]  DEV_ADDR = 7'h38
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid_in,
  input  logic [7:0] reg_addr,
  output logic [7:0] data_out,
  output logic       valid_out,
  output logic       ack_err,
  output logic       busy,
  output logic       scl,
  input  logic       sda_in,
  output logic       sda_oe
);
  typedef enum logic [3:0] {
    IDLE, START, SEND_ADDRESS, SET_DATA_ADDRESS, END, BUFFER,
    START2, SEND_ADDRESS2, RECEIVE_DATA, END2
  } state_e;

  localparam int unsigned QUARTER = CLK_FREQ / I2C_FREQ / 4;
  localparam int unsigned QW      = $clog2(QUARTER);

  state_e     state;
  logic [QW-1:0] qcount;
  logic [1:0] quarter;
  logic [3:0] bitn;       // 0-7 data bits, 8 acknowledge slot
  logic [7:0] tx_byte;
  logic [7:0] rx_byte;
  logic       nack;       // an acknowledge slot read high
  logic       sda_low;    // registered SDA drive

  wire q_end    = (qcount == QW'(QUARTER - 1));
  wire slot_end = q_end && (quarter == 2'd3);
  wire sample   = q_end && (quarter == 2'd2);

  assign busy   = (state != IDLE);
  assign sda_oe = sda_low;

  // Byte sent in the current address/register state.
  logic [7:0] cur_byte;
  always_comb begin
    unique case (state)
      SEND_ADDRESS:  cur_byte = {DEV_ADDR, 1'b0};
      SEND_ADDRESS2: cur_byte = {DEV_ADDR, 1'b1};
      default:       cur_byte = tx_byte;
    endcase
  end
  // SCL and SDA as a function of state and quarter.
  always_ff @(posedge clk) begin
    if (rst) begin
      scl     <= 1'b1;
      sda_low <= 1'b0;
    end else begin
      unique case (state)
        IDLE, BUFFER: begin
          scl     <= 1'b1;
          sda_low <= 1'b0;
        end
        START, START2: begin
          // data high->low while clock high, then clock high->low
          scl     <= (quarter < 2'd2);
          sda_low <= (quarter != 2'd0);
        end
        END, END2: begin
          // clock low->high while data low, then data low->high
          scl     <= (quarter != 2'd0);
          sda_low <= (quarter < 2'd2);
        end
        RECEIVE_DATA: begin
          scl     <= quarter[1];
          sda_low <= (bitn == 4'd8);          // master acknowledge
        end
        default: begin                        // address / register bits
          scl     <= quarter[1];
          sda_low <= (bitn != 4'd8) && !cur_byte[3'(7 - bitn)];
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      qcount    <= '0;
      quarter   <= '0;
      bitn      <= '0;
      tx_byte   <= '0;
      rx_byte   <= '0;
      nack      <= 1'b0;
      data_out  <= '0;
      valid_out <= 1'b0;
      ack_err   <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      ack_err   <= 1'b0;
      if (state == IDLE) begin
        qcount  <= '0;
        quarter <= '0;
        bitn    <= '0;
        nack    <= 1'b0;
        if (valid_in) begin
          tx_byte <= reg_addr;
          state   <= START;
        end
      end else begin
        qcount <= q_end ? '0 : qcount + 1'b1;
        if (q_end) quarter <= quarter + 1'b1;

        // Sample acknowledge slots and received data bits.
        if (sample && bitn == 4'd8 &&
            (state == SEND_ADDRESS || state == SET_DATA_ADDRESS || state == SEND_ADDRESS2))
          nack <= sda_in;
        if (sample && state == RECEIVE_DATA && bitn != 4'd8)
          rx_byte <= {rx_byte[6:0], sda_in};

        if (slot_end) begin
          unique case (state)
            START, START2: begin
              bitn  <= '0;
              state <= (state == START) ? SEND_ADDRESS : SEND_ADDRESS2;
            end
            SEND_ADDRESS, SET_DATA_ADDRESS, SEND_ADDRESS2, RECEIVE_DATA: begin
              if (bitn != 4'd8) begin
                bitn <= bitn + 1'b1;
              end else begin
                bitn <= '0;
                if (nack) state <= END2;
                else unique case (state)
                  SEND_ADDRESS:     state <= SET_DATA_ADDRESS;
                  SET_DATA_ADDRESS: state <= END;
                  SEND_ADDRESS2:    state <= RECEIVE_DATA;
                  default:          state <= END2;
                endcase
              end
            end
            END:    state <= BUFFER;
            BUFFER: state <= START2;
            END2: begin
              state <= IDLE;
              if (nack) ack_err <= 1'b1;
              else begin
                data_out  <= rx_byte;
                valid_out <= 1'b1;
              end
            end
            default: state <= IDLE;
          endcase
        end
      end
    end
  end


  // Between transactions the master leaves both lines released.
  assert property (@(posedge clk) disable iff (rst) (state == IDLE) |-> (scl && !sda_oe))
    else $error("i2c_controller: bus not released while idle");
endmodule
