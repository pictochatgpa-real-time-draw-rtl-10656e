// tb_synchronizer: the output must equal the input two cycles earlier, and
// start at the idle level 1 after reset.
module tb_synchronizer;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic d = 1, q;
  logic [1:0] hist;
  synchronizer dut (.clk, .rst, .d, .q);

  initial begin
    repeat (3) @(posedge clk);
    #1 check(q == 1'b1, "reset value 1");
    rst = 0;
    hist = 2'b11;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      check(q == hist[1], $sformatf("cycle %0d q=%b expected %b", i, q, hist[1]));
      d = 1'($urandom);
      @(posedge clk);
      hist = {hist[0], d};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
