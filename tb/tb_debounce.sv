// tb_debounce: a bounce shorter than the window must not reach the output;
// a level held for the whole window must, exactly DEBOUNCE_CYCLES + 2 cycles
// after it started (two synchroniser stages plus the window).
module tb_debounce;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int W = 20;
  logic btn_in = 0, btn_out;
  debounce #(.DEBOUNCE_CYCLES(W)) dut (.clk, .rst, .btn_in, .btn_out);

  task automatic press_for(input int n, input bit lvl);
    @(negedge clk); btn_in = lvl;
    repeat (n) @(negedge clk);
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst = 0;
    check(!btn_out, "low after reset");
    for (int k = 0; k < 5; k++) begin
      press_for(W / 2, 1);
      press_for(3, 0);
      check(!btn_out, "bounce filtered");
    end
    repeat (W + 5) @(negedge clk);
    @(negedge clk); btn_in = 1;
    n = 0;
    while (!btn_out && n < 3 * W) begin @(negedge clk); n++; end
    check(n == W + 2, $sformatf("rise after %0d cycles, expected %0d", n, W + 2));
    press_for(W - 3, 0);
    press_for(1, 1);
    check(btn_out, "short release filtered");
    @(negedge clk); btn_in = 0;
    n = 0;
    while (btn_out && n < 3 * W) begin @(negedge clk); n++; end
    check(n == W + 2, $sformatf("fall after %0d cycles", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
