// touch: reads the first touch position from the capacitive touch controller.
//
// The controller pulls its interrupt line low while a finger is on the panel.
// From IDLE, a low interrupt starts four register reads through
// i2c_controller, one per state: GET_X reads 8'h03 (X[11:8]), GET_X2 reads
// 8'h04 (X[7:0]), GET_Y reads 8'h05 (Y[11:8]) and GET_Y2 reads 8'h06 (Y[7:0]).
// After the last one the 12-bit X and Y are presented with a one-cycle
// `valid_out` pulse on the return to IDLE. While the finger stays down the
// sequence repeats. States, registers and order follow the design
// description; only the low four bits of the high-byte registers are kept
// (the upper bits of those registers hold status flags).
//
// The interrupt is synchronised with two flip-flops. Each read is a request
// (`i2c_valid`, `i2c_reg`) answered by `i2c_valid_out` with `i2c_data`, about
// 41,000 cycles later at 100 kHz, so a position takes about 164,000 cycles.
// If a read reports `i2c_ack_err` the sequence is abandoned and the block
// returns to IDLE without a position (this design's choice).
module touch (
  input  logic        clk,
  input  logic        rst,
  input  logic        irq_n,
  // to/from i2c_controller
  output logic        i2c_valid,
  output logic [7:0]  i2c_reg,
  input  logic [7:0]  i2c_data,
  input  logic        i2c_valid_out,
  input  logic        i2c_ack_err,
  // position
  output logic [11:0] x_out,
  output logic [11:0] y_out,
  output logic        valid_out
);
  typedef enum logic [2:0] {IDLE, GET_X, GET_X2, GET_Y, GET_Y2} state_e;

  state_e state;
  logic   irq_m, irq_s;
  logic   issued;       // request for the current state already sent

  always_comb begin
    unique case (state)
      GET_X:   i2c_reg = 8'h03;
      GET_X2:  i2c_reg = 8'h04;
      GET_Y:   i2c_reg = 8'h05;
      default: i2c_reg = 8'h06;
    endcase
  end

  assign i2c_valid = (state != IDLE) && !issued;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      irq_m     <= 1'b1;
      irq_s     <= 1'b1;
      issued    <= 1'b0;
      x_out     <= '0;
      y_out     <= '0;
      valid_out <= 1'b0;
    end else begin
      irq_m     <= irq_n;
      irq_s     <= irq_m;
      valid_out <= 1'b0;
      if (i2c_valid) issued <= 1'b1;
      unique case (state)
        IDLE: begin
          issued <= 1'b0;
          if (!irq_s) state <= GET_X;
        end
        default: begin
          if (i2c_ack_err) begin
            state  <= IDLE;
            issued <= 1'b0;
          end else if (i2c_valid_out) begin
            issued <= 1'b0;
            unique case (state)
              GET_X:  begin x_out[11:8] <= i2c_data[3:0]; state <= GET_X2; end
              GET_X2: begin x_out[7:0]  <= i2c_data;      state <= GET_Y;  end
              GET_Y:  begin y_out[11:8] <= i2c_data[3:0]; state <= GET_Y2; end
              default: begin
                y_out[7:0] <= i2c_data;
                valid_out  <= 1'b1;
                state      <= IDLE;
              end
            endcase
          end
        end
      endcase
    end
  end
endmodule
