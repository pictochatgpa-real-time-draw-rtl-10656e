// tb_baud_gen: at the default 868 cycles per baud (100 MHz / 115,200), ticks
// must be one cycle wide and exactly 868 cycles apart.
module tb_baud_gen;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic tick;
  baud_gen dut (.clk, .rst, .tick);

  initial begin
    int last, n, first;
    repeat (3) @(posedge clk);
    rst = 0;
    last = -1; n = 0; first = 1;
    for (int c = 0; c < 10 * 868 + 10; c++) begin
      @(posedge clk); #1;
      n++;
      if (tick) begin
        if (!first) check(n == 868, $sformatf("tick spacing %0d", n));
        first = 0;
        n = 0;
        @(posedge clk); #1; n++;
        check(!tick, "tick one cycle wide");
      end
    end
    check(checks >= 18, "enough ticks seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
