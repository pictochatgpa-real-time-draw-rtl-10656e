// tb_bt_rx: sends messages of colour, y, x, 8'h0A as UART frames (with a
// parity bit, as the host sends them) and checks the decoded draw request,
// including coordinates equal to 8'h0A, and that a malformed message is
// dropped and the next good one is decoded.
module tb_bt_rx;
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
  logic       rx = 1, valid_out, resync;
  logic [7:0] x_out, y_out;
  color_e     color_out;
  int         nvalid = 0, nresync = 0;

  bt_rx #(.CLKS_PER_BAUD(B)) dut (.clk, .rst, .rx, .x_out, .y_out, .color_out,
                                  .valid_out, .resync);

  always @(posedge clk) begin
    if (valid_out) nvalid++;
    if (resync) nresync++;
  end

  task automatic frame(input logic [7:0] d);
    @(negedge clk); rx = 0;
    repeat (B) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = d[i]; repeat (B) @(negedge clk); end
    rx = ^d; repeat (B) @(negedge clk);
    rx = 1;  repeat (2 * B) @(negedge clk);
  endtask

  task automatic msg(input logic [7:0] c, input logic [7:0] y, input logic [7:0] x);
    frame(c); frame(y); frame(x); frame(8'h0A);
  endtask

  initial begin
    int n0;
    logic [7:0] x, y;
    logic [1:0] c;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 6; i++) begin
      x = (i == 2) ? 8'h0A : 8'($urandom);
      y = (i == 3) ? 8'h0A : 8'($urandom);
      c = 2'($urandom);
      n0 = nvalid;
      msg({6'd0, c}, y, x);
      check(nvalid == n0 + 1, "one request per message");
      check(x_out == x && y_out == y && color_out == color_e'(c),
            $sformatf("got (%h,%h,%0d) expected (%h,%h,%0d)", x_out, y_out, color_out, x, y, c));
    end
    // malformed: terminator missing, then junk up to a newline
    n0 = nvalid;
    frame(8'h01); frame(8'h22); frame(8'h33); frame(8'h44); frame(8'h55); frame(8'h0A);
    check(nvalid == n0 && nresync == 1, "malformed message dropped");
    msg(8'h02, 8'h10, 8'h20);
    check(nvalid == n0 + 1 && x_out == 8'h20 && y_out == 8'h10 && color_out == COLOR_RED,
          "next message decoded after resync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
