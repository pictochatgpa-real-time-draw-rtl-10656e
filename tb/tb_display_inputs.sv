// tb_display_inputs: a local and a remote request arriving together are both
// drawn, local first; a request waits while the display is busy; a newer
// request from the same source replaces an older one not yet drawn (and
// `dropped` says so); nothing is offered when nothing is waiting.
module tb_display_inputs;
  import pictochat_pkg::*;
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
  logic      local_valid = 0, remote_valid = 0, display_ready = 0;
  draw_req_t local_req = '0, remote_req = '0, draw_req;
  logic      draw_valid, draw_is_remote, dropped;
  int        ndropped = 0;

  display_inputs dut (.clk, .rst, .local_valid, .local_req, .remote_valid, .remote_req,
                      .display_ready, .draw_valid, .draw_req, .draw_is_remote, .dropped);

  always @(posedge clk) if (dropped && !rst) ndropped++;

  function automatic draw_req_t mk(int x, int y, int c);
    return '{x: 9'(x), y: 9'(y), color: color_e'(c)};
  endfunction

  // accept one request: ready for one cycle, return what was taken
  task automatic accept(output draw_req_t r, output bit remote, output bit any);
    @(negedge clk);
    any = draw_valid; r = draw_req; remote = draw_is_remote;
    display_ready = 1;
    @(negedge clk);
    display_ready = 0;
  endtask

  initial begin
    draw_req_t r;
    bit remote, any;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(!draw_valid, "nothing offered after reset");
    local_valid = 1; local_req = mk(10, 20, 1);
    remote_valid = 1; remote_req = mk(100, 200, 3);
    @(negedge clk);
    local_valid = 0; remote_valid = 0; local_req = mk(1, 1, 0); remote_req = mk(2, 2, 0);
    repeat (5) @(negedge clk);
    check(draw_valid && draw_req == mk(10, 20, 1), "local request held while display busy");
    accept(r, remote, any);
    check(any && !remote && r == mk(10, 20, 1), "local drawn first");
    accept(r, remote, any);
    check(any && remote && r == mk(100, 200, 3), "remote drawn next");
    @(negedge clk);
    check(!draw_valid, "nothing left");
    // replacement
    local_valid = 1; local_req = mk(5, 6, 2);
    @(negedge clk);
    local_req = mk(7, 8, 3);
    @(negedge clk);
    local_valid = 0;
    @(negedge clk);
    check(ndropped == 1, $sformatf("older waiting request reported dropped (%0d)", ndropped));
    accept(r, remote, any);
    check(any && !remote && r == mk(7, 8, 3), "newest local request drawn");
    @(negedge clk);
    check(!draw_valid, "replaced request not drawn twice");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
