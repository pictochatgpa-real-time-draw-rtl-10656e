// tb_color_select: black after reset; each press steps black, white, red,
// blue, black; holding the button steps only once.
module tb_color_select;
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
  logic btn = 0;
  color_e color;
  color_select dut (.clk, .rst, .btn, .color);

  initial begin
    color_e expected;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(color == COLOR_BLACK, "black after reset");
    expected = COLOR_BLACK;
    for (int i = 0; i < 9; i++) begin
      btn = 1;
      repeat (1 + (i % 4) * 5) @(negedge clk);
      btn = 0;
      repeat (3) @(negedge clk);
      case (expected)
        COLOR_BLACK: expected = COLOR_WHITE;
        COLOR_WHITE: expected = COLOR_RED;
        COLOR_RED:   expected = COLOR_BLUE;
        default:     expected = COLOR_BLACK;
      endcase
      check(color == expected, $sformatf("press %0d colour %0d expected %0d", i, color, expected));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
