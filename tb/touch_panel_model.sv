// touch_panel_model: behavioural model of the capacitive touch controller's
// I2C slave side, for testbenches only (not synthesizable).
//
// It answers at 7-bit address ADDR. A write transfer sets the register
// pointer from its first data byte; a read transfer returns the byte at the
// pointer (the pointer then advances). Registers 8'h03..8'h06 hold the touch
// position: {2'b10 event flag, 2'b00, X[11:8]}, X[7:0], {2'b10, 2'b00, Y[11:8]},
// Y[7:0]. The model acknowledges its address and every byte written to it.
// `sda` is the resolved bus level; `sda_pull` = 1 pulls the bus low.
// `reads` counts completed read transfers, `last_ptr` is the pointer value.
module touch_panel_model #(
  parameter logic [6:0] ADDR = 7'h38
) (
  input  logic        scl,
  input  logic        sda,
  output logic        sda_pull,
  input  logic [11:0] touch_x,
  input  logic [11:0] touch_y,
  output int          reads,
  output logic [7:0]  last_ptr
);
  logic [7:0] ptr;
  logic [7:0] b, data;

  function automatic logic [7:0] reg_value(logic [7:0] a);
    case (a)
      8'h03:   return {4'b1000, touch_x[11:8]};
      8'h04:   return touch_x[7:0];
      8'h05:   return {4'b1000, touch_y[11:8]};
      8'h06:   return touch_y[7:0];
      default: return 8'hEE;
    endcase
  endfunction

  assign last_ptr = ptr;

  initial begin
    sda_pull = 1'b0;
    reads    = 0;
    ptr      = 8'h00;
    forever begin
      @(negedge sda iff scl);              // START
      for (int i = 7; i >= 0; i--) begin
        @(posedge scl);
        b[i] = sda;
      end
      @(negedge scl);
      if (b[7:1] == ADDR) begin
        sda_pull = 1'b1;                   // acknowledge address
        @(negedge scl);
        sda_pull = 1'b0;
        if (!b[0]) begin                   // write: register pointer
          for (int i = 7; i >= 0; i--) begin
            @(posedge scl);
            b[i] = sda;
          end
          @(negedge scl);
          sda_pull = 1'b1;
          @(negedge scl);
          sda_pull = 1'b0;
          ptr = b;
        end else begin                     // read: one data byte
          data = reg_value(ptr);
          for (int i = 7; i >= 0; i--) begin
            sda_pull = !data[i];
            @(negedge scl);
          end
          sda_pull = 1'b0;                 // master's acknowledge slot
          ptr   = ptr + 8'd1;
          reads = reads + 1;
        end
      end
    end
  end
endmodule
