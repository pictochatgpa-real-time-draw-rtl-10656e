// tb_seven_seg: for every byte value, the left digit must show the high
// nibble and the right digit the low nibble (active-low segments, a = bit 0),
// each digit lit for REFRESH_CYCLES cycles in turn.
module tb_seven_seg;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int R = 8;
  logic [7:0] value = 0;
  logic [1:0] an;
  logic [6:0] seg;
  seven_seg #(.REFRESH_CYCLES(R)) dut (.clk, .rst, .value, .an, .seg);

  // segment patterns gfedcba (active high) for 0..F
  logic [6:0] glyph [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                             7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  initial begin
    int left_seen, right_seen;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int v = 0; v < 256; v += 7) begin
      @(negedge clk); value = 8'(v);
      left_seen = 0; right_seen = 0;
      for (int c = 0; c < 2 * R; c++) begin
        @(negedge clk);
        if (an == 2'b01) begin
          left_seen++;
          check(seg == ~glyph[v / 16], $sformatf("left digit of %0h", v));
        end else if (an == 2'b10) begin
          right_seen++;
          check(seg == ~glyph[v % 16], $sformatf("right digit of %0h", v));
        end else check(0, "exactly one digit enabled");
      end
      check(left_seen == R && right_seen == R, "each digit lit for R cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
