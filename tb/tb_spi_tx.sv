// tb_spi_tx: sends random bytes with random data/command flags at the default
// 1 MHz bit rate and checks the byte and flag seen by the display model, that
// MOSI only changes while SCLK is low, that SCLK is 1 MHz (100 cycles per
// bit) and that a byte takes 801 cycles from hand-over to `ready`.
module tb_spi_tx;
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
  logic       valid_in = 0, dc_in = 0, ready, sclk, mosi, cs_n, dc;
  logic [7:0] data_in = 0;

  spi_tx dut (.clk, .rst, .valid_in, .data_in, .dc_in, .ready, .sclk, .mosi, .cs_n, .dc);
  lcd_model lcd (.sclk, .mosi, .cs_n, .dc, .rst_n(1'b1));

  int   bad_change = 0;
  logic mosi_q, sclk_q;
  int   last_rise = -1, period_bad = 0;
  always @(posedge clk) begin
    if (!rst && mosi != mosi_q && sclk_q && sclk) bad_change++;
    if (sclk && !sclk_q) begin
      if (last_rise >= 0 && !cs_n && ($time / 10 - last_rise) != 100) period_bad++;
      last_rise = $time / 10;
    end
    if (cs_n) last_rise = -1;
    mosi_q <= mosi;
    sclk_q <= sclk;
  end

  initial begin
    logic [8:0] sent [$];
    logic [8:0] g;
    int n;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(ready && cs_n, "ready and deselected after reset");
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      valid_in = 1; data_in = (i == 0) ? 8'hA5 : 8'($urandom); dc_in = 1'($urandom);
      sent.push_back({dc_in, data_in});
      @(negedge clk);
      valid_in = 0; data_in = 8'($urandom);
      n = 1;
      while (!ready) begin @(negedge clk); n++; end
      check(n == 801, $sformatf("byte took %0d cycles", n));
    end
    repeat (5) @(negedge clk);
    check(lcd.log.size() == 20, "20 bytes received");
    for (int i = 0; i < 20 && lcd.log.size() > 0; i++) begin
      g = lcd.log.pop_front();
      check(g == sent[i], $sformatf("byte %0d: %h expected %h", i, g, sent[i]));
    end
    check(bad_change == 0, "MOSI changes only while SCLK is low");
    check(period_bad == 0, "SCLK period 100 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
