// tb_uart_rx: drives frames of start, 8 data bits LSB first, parity and stop
// into the receiver and checks each byte, the time of `valid_out` (10.5 baud
// periods after the start edge), that a short low glitch is not taken for a
// start bit, and that a frame with a low stop bit is dropped.
module tb_uart_rx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int B = 16;
  logic       rx = 1, valid_out;
  logic [7:0] data_out;
  int         nvalid = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BAUD(B)) dut (.clk, .rst, .rx, .data_out, .valid_out);

  always @(posedge clk) if (valid_out) begin nvalid++; last = data_out; end

  task automatic frame(input logic [7:0] d, input bit stop);
    @(negedge clk); rx = 0;
    repeat (B) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = d[i]; repeat (B) @(negedge clk); end
    rx = ^d;  repeat (B) @(negedge clk);          // parity (ignored)
    rx = stop; repeat (B) @(negedge clk);
    rx = 1;
  endtask

  initial begin
    logic [7:0] d;
    int n0, t0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      d = (i == 0) ? 8'h00 : (i == 1) ? 8'hFF : 8'($urandom);
      n0 = nvalid;
      fork
        frame(d, 1);
        begin
          t0 = $time;
          @(posedge valid_out);
          check((($time - t0) / 10) == B * 10 + B / 2 + 1,
                $sformatf("valid after %0d cycles", ($time - t0) / 10));
        end
      join
      repeat (2) @(negedge clk);
      check(nvalid == n0 + 1 && last == d, $sformatf("byte %h got %h", d, last));
      repeat (3) @(negedge clk);
    end
    // glitch shorter than half a bit
    n0 = nvalid;
    @(negedge clk); rx = 0; repeat (B / 4) @(negedge clk); rx = 1;
    repeat (15 * B) @(negedge clk);
    check(nvalid == n0, "glitch ignored");
    // framing error
    frame(8'h5A, 0);
    repeat (2 * B) @(negedge clk);
    check(nvalid == n0, "low stop bit drops the byte");
    frame(8'hC3, 1);
    repeat (4) @(negedge clk);
    check(nvalid == n0 + 1 && last == 8'hC3, "recovers after framing error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
