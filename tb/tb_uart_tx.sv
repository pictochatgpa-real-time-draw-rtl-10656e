// tb_uart_tx: decodes the transmitter's line in the middle of every bit and
// checks start bit, eight data bits LSB first and stop bit for random bytes
// sent back to back, that the input may change once a byte is taken, and
// that consecutive start bits are exactly 20 baud periods apart (start, 8
// data, stop, 10-period buffer).
module tb_uart_tx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int B = 16;
  logic       tick, valid_in = 0, ready, tx;
  logic [7:0] data_in = 0;
  logic [7:0] sent [$];

  baud_gen #(.CLKS_PER_BAUD(B)) u_baud (.clk, .rst, .tick);
  uart_tx dut (.clk, .rst, .baud_tick(tick), .valid_in, .data_in, .ready, .tx);

  // producer: offer random bytes, scramble data_in after each hand-over
  initial begin
    @(negedge rst);
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      valid_in = 1; data_in = 8'($urandom);
      @(posedge clk);
      while (!ready) @(posedge clk);
      sent.push_back(data_in);
      @(negedge clk);
      valid_in = 0; data_in = 8'($urandom);
    end
  end

  initial begin
    int t_prev, t_now, got;
    logic [7:0] b, exp_b;
    repeat (3) @(posedge clk);
    rst = 0;
    #1 check(tx == 1'b1, "idle high");
    t_prev = -1; got = 0;
    while (got < 12) begin
      @(negedge tx);
      t_now = $time;
      if (t_prev >= 0) check(t_now - t_prev == 20 * B * 10,
                             $sformatf("start-to-start %0d ns", t_now - t_prev));
      t_prev = t_now;
      #(B * 10 / 2);
      check(tx == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        #(B * 10);
        b[i] = tx;
      end
      #(B * 10);
      check(tx == 1'b1, "stop bit");
      exp_b = sent.pop_front();
      check(b == exp_b, $sformatf("byte %0d: %h expected %h", got, b, exp_b));
      for (int k = 0; k < 10; k++) begin
        #(B * 10);
        if (got < 11) check(tx == 1'b1, "buffer period high");
      end
      got++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
