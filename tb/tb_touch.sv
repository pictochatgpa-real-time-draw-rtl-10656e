// tb_touch: the touch block with the I2C controller at its default 100 kHz
// rate and a model of the touch controller. While the interrupt is high
// nothing is read; a touch gives X and Y from registers 03-06 (status bits of
// the high registers masked off) after four register reads of about 41,000
// cycles each; a held touch keeps producing positions; releasing the touch
// stops the reads. A second copy talks to a controller at another address:
// every read is refused, and it must return to IDLE and retry without ever
// reporting a position.
module tb_touch;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic        irq_n = 1;
  logic        i2c_valid, i2c_valid_out, i2c_ack_err, scl, sda_oe, sda, pull;
  logic [7:0]  i2c_reg, i2c_data, ptr;
  logic [11:0] x_out, y_out, tx = 12'h0EF, ty = 12'h13B;
  logic        valid_out;
  int          reads, nvalid = 0;

  assign sda = !(sda_oe || pull);

  i2c_controller u_i2c (.clk, .rst, .valid_in(i2c_valid), .reg_addr(i2c_reg),
    .data_out(i2c_data), .valid_out(i2c_valid_out), .ack_err(i2c_ack_err), .busy(),
    .scl, .sda_in(sda), .sda_oe);
  touch dut (.clk, .rst, .irq_n, .i2c_valid, .i2c_reg, .i2c_data, .i2c_valid_out,
             .i2c_ack_err, .x_out, .y_out, .valid_out);
  touch_panel_model panel (.scl, .sda, .sda_pull(pull), .touch_x(tx), .touch_y(ty),
                           .reads, .last_ptr(ptr));

  always @(posedge clk) if (valid_out) nvalid++;

  // copy whose touch controller never acknowledges
  logic        v2, vo2, err2, scl2, oe2, sda2, pull2, valid2;
  logic [7:0]  reg2, d2, ptr2;
  logic [11:0] x2, y2;
  int          reads2, nvalid2 = 0, nerr2 = 0;
  assign sda2 = !(oe2 || pull2);
  i2c_controller u_i2c2 (.clk, .rst, .valid_in(v2), .reg_addr(reg2), .data_out(d2),
    .valid_out(vo2), .ack_err(err2), .busy(), .scl(scl2), .sda_in(sda2), .sda_oe(oe2));
  touch dut2 (.clk, .rst, .irq_n, .i2c_valid(v2), .i2c_reg(reg2), .i2c_data(d2),
    .i2c_valid_out(vo2), .i2c_ack_err(err2), .x_out(x2), .y_out(y2), .valid_out(valid2));
  touch_panel_model #(.ADDR(7'h15)) panel2 (.scl(scl2), .sda(sda2), .sda_pull(pull2),
    .touch_x(tx), .touch_y(ty), .reads(reads2), .last_ptr(ptr2));
  always @(posedge clk) begin
    if (valid2 && !rst) nvalid2++;
    if (err2 && !rst) nerr2++;
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3000) @(negedge clk);
    check(reads == 0 && nvalid == 0, "no reads without a touch");
    irq_n = 0;
    n = 0;
    while (!valid_out) begin @(negedge clk); n++; end
    check(x_out == tx && y_out == ty, $sformatf("position %h,%h expected %h,%h", x_out, y_out, tx, ty));
    check(reads == 4, "four register reads");
    check(n > 4 * 41000 && n < 4 * 41000 + 100, $sformatf("position after %0d cycles", n));
    // move while held
    tx = 12'h0A0; ty = 12'h0FF;
    @(negedge clk);
    while (!valid_out) @(negedge clk);
    @(negedge clk);
    while (!valid_out) @(negedge clk);
    check(x_out == tx && y_out == ty, "held touch keeps reporting, new position");
    irq_n = 1;
    repeat (4 * 41000 + 100) @(negedge clk);
    n = nvalid;
    repeat (3000) @(negedge clk);
    check(nvalid == n, "stops after release");
    check(nvalid2 == 0 && reads2 == 0, "no position from a controller that does not acknowledge");
    check(nerr2 >= 3, $sformatf("refused reads retried from IDLE: %0d", nerr2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
