// tb_i2c_controller: checks the I2C register read against a model of the
// touch controller at the default 100 kHz bus rate. For several registers it
// checks the byte returned, that the register pointer was written, that the
// read takes 41 bit times (41,000 cycles), that a wrong device address ends
// in `ack_err` without `valid_out`, and that the bus is idle (both lines
// high) between transfers.
module tb_i2c_controller;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic       valid_in, valid_out, ack_err, busy, scl, sda_oe, sda;
  logic [7:0] reg_addr, data_out;
  logic       valid_out2, ack_err2, busy2, scl2, sda_oe2, sda2;
  logic [7:0] data_out2;
  logic       pull, pull2;
  int         reads, reads2;
  logic [7:0] ptr, ptr2;

  assign sda  = !(sda_oe || pull);
  assign sda2 = !(sda_oe2 || pull2);

  i2c_controller dut (.clk, .rst, .valid_in, .reg_addr, .data_out, .valid_out,
                      .ack_err, .busy, .scl, .sda_in(sda), .sda_oe);
  touch_panel_model #(.ADDR(7'h38)) panel (.scl, .sda, .sda_pull(pull),
    .touch_x(12'hA5C), .touch_y(12'h3E7), .reads, .last_ptr(ptr));

  // Second controller talks to a device at another address: expect NACK.
  i2c_controller dut2 (.clk, .rst, .valid_in, .reg_addr, .data_out(data_out2),
                       .valid_out(valid_out2), .ack_err(ack_err2), .busy(busy2),
                       .scl(scl2), .sda_in(sda2), .sda_oe(sda_oe2));
  touch_panel_model #(.ADDR(7'h21)) other (.scl(scl2), .sda(sda2), .sda_pull(pull2),
    .touch_x(12'h0), .touch_y(12'h0), .reads(reads2), .last_ptr(ptr2));

  function automatic logic [7:0] expect_reg(logic [7:0] a);
    case (a)
      8'h03: return 8'h8A;
      8'h04: return 8'h5C;
      8'h05: return 8'h83;
      default: return 8'hE7;
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, n;
    bit got_err;
    valid_in = 0; reg_addr = 0;
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    check(scl && sda, "bus idle after reset");
    for (int r = 3; r <= 6; r++) begin
      @(negedge clk);
      valid_in = 1; reg_addr = 8'(r);
      @(negedge clk);
      valid_in = 0;
      t0 = $time;
      n = 0; got_err = 0;
      while (!valid_out) begin
        @(posedge clk); #1;
        n++;
        if (ack_err2) got_err = 1;
      end
      check(data_out == expect_reg(8'(r)), $sformatf("reg %0h data %0h", r, data_out));
      check(ptr == 8'(r + 1), "register pointer written then advanced");
      check(n >= 40990 && n <= 41010, $sformatf("read took %0d cycles, expected ~41000", n));
      if (r == 3) begin
        check(got_err, "wrong address gives ack_err");
        check(reads2 == 0, "no read at wrong address");
      end
      repeat (20) @(posedge clk);
      check(scl && sda && !busy, "bus idle after STOP");
    end
    check(reads == 4, "four read transfers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // valid_out2 must never pulse (address mismatch)
  always @(posedge clk) if (valid_out2) begin failures++; $display("FAIL: valid_out on NACK"); end
endmodule
