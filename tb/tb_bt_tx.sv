// tb_bt_tx: records touches, presses "send" and decodes the UART line. Each
// message must be colour, y, x, 8'h0A (low 8 bits of the last touch), take
// 80 baud periods from first to last start bit plus its frame, ignore a
// second press while busy, and wait while the Bluetooth side is not ready.
module tb_bt_tx;
  import pictochat_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int B = 16;
  logic       touch_valid = 0, send = 0, rts_n = 0, busy, tx;
  logic [7:0] touch_x = 0, touch_y = 0;
  color_e     color = COLOR_BLACK;
  logic [7:0] rx_bytes [$];
  int         start_times [$];

  bt_tx #(.CLKS_PER_BAUD(B)) dut (.clk, .rst, .touch_valid, .touch_x, .touch_y,
                                  .color, .send, .rts_n, .busy, .tx);

  // line decoder (10-bit frames)
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge tx);
      start_times.push_back($time / 10);
      #(B * 10 / 2);
      for (int i = 0; i < 8; i++) begin #(B * 10); b[i] = tx; end
      #(B * 10);
      if (tx !== 1'b1) begin failures++; $display("FAIL: stop bit"); end
      rx_bytes.push_back(b);
    end
  end

  task automatic touch_at(input logic [7:0] x, input logic [7:0] y);
    @(negedge clk); touch_x = x; touch_y = y; touch_valid = 1;
    @(negedge clk); touch_valid = 0; touch_x = 8'($urandom); touch_y = 8'($urandom);
  endtask

  task automatic press();
    @(negedge clk); send = 1;
    repeat (5) @(negedge clk); send = 0;
  endtask

  task automatic expect_msg(input color_e c, input logic [7:0] y, input logic [7:0] x);
    logic [7:0] e [4];
    e = '{{6'd0, c}, y, x, 8'h0A};
    check(rx_bytes.size() == 4, $sformatf("4 bytes, got %0d", rx_bytes.size()));
    for (int i = 0; i < 4 && rx_bytes.size() > 0; i++) begin
      logic [7:0] g;
      g = rx_bytes.pop_front();
      check(g == e[i], $sformatf("byte %0d = %h expected %h", i, g, e[i]));
    end
    if (start_times.size() == 4)
      check(start_times[3] - start_times[0] == 60 * B, "bytes 20 baud periods apart");
    rx_bytes.delete();
    start_times.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    check(!busy && tx, "idle");
    touch_at(8'd37, 8'd90);
    color = COLOR_BLUE;
    press();
    repeat (10) @(negedge clk);
    check(busy, "busy while sending");
    press();                                   // ignored: still busy
    wait (!busy);
    repeat (25 * B) @(negedge clk);
    expect_msg(COLOR_BLUE, 8'd90, 8'd37);
    // flow control: not ready, nothing may start
    rts_n = 1;
    touch_at(8'h0A, 8'hF0);
    color = COLOR_RED;
    press();
    repeat (100 * B) @(negedge clk);
    check(rx_bytes.size() == 0 && start_times.size() == 0, "held while not ready");
    rts_n = 0;
    wait (!busy);
    repeat (25 * B) @(negedge clk);
    expect_msg(COLOR_RED, 8'hF0, 8'h0A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
