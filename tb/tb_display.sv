// tb_display: with a shortened reset and SPI bit time, checks the reset
// pulse, the 49 start-up bytes (commands and parameters as listed in the
// start-up table), then draw requests of every brush size and colour: the
// window commands and bounds, the number of pixel bytes, the pixels written
// into the display model, and the time of each draw in SPI bytes.
module tb_display;
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
  localparam int SB = 4;                 // SPI clocks per bit
  localparam int BYTE_CYC = 8 * SB + 1;
  logic       valid_in = 0, ready, init_done, lcd_rst_n, sclk, mosi, cs_n, dc;
  logic [8:0] x_in = 0, y_in = 0;
  color_e     color_in = COLOR_BLACK;
  logic [1:0] space = 0;

  display #(.RESET_CYCLES(10), .POST_RESET_CYCLES(30), .SPI_CLKS_PER_BIT(SB)) dut (
    .clk, .rst, .valid_in, .x_in, .y_in, .color_in, .space, .ready, .init_done,
    .lcd_rst_n, .sclk, .mosi, .cs_n, .dc);
  lcd_model lcd (.sclk, .mosi, .cs_n, .dc, .rst_n(lcd_rst_n));

  // start-up table: command byte, then its parameters
  logic [8:0] init_seq [$] = '{
    9'h028,
    9'h0CF, 9'h100, 9'h183, 9'h130,
    9'h0ED, 9'h164, 9'h103, 9'h112, 9'h181,
    9'h0E8, 9'h185, 9'h101, 9'h179,
    9'h0CB, 9'h139, 9'h12C, 9'h100, 9'h134,
    9'h0F7, 9'h120,
    9'h0EA, 9'h100, 9'h100,
    9'h0C0, 9'h126,
    9'h0C1, 9'h111,
    9'h0C5, 9'h135, 9'h13E,
    9'h0C7, 9'h1BE,
    9'h03A, 9'h155,
    9'h0B1, 9'h100,
    9'h026, 9'h101,
    9'h051, 9'h1FF,
    9'h0B7, 9'h107,
    9'h0B6, 9'h10A, 9'h182, 9'h127, 9'h100,
    9'h029};

  function automatic logic [15:0] rgb(color_e c);
    case (c)
      COLOR_BLACK: return 16'h0000;
      COLOR_WHITE: return 16'hFFFF;
      COLOR_RED:   return 16'hF800;
      default:     return 16'h001F;
    endcase
  endfunction

  initial begin
    int n, nbytes, side, t0, cyc;
    logic [8:0] g;
    logic [15:0] x2, y2;
    bit pix_ok;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(!lcd_rst_n && !ready, "display held in reset first");
    wait (init_done);
    @(negedge clk);
    check(lcd_rst_n && lcd.resets <= 1, "reset released, pulsed once");
    check(ready, "ready after start-up");
    repeat (2 * BYTE_CYC) @(negedge clk);
    check(lcd.log.size() == 49, $sformatf("49 start-up bytes, got %0d", lcd.log.size()));
    for (int i = 0; i < 49 && lcd.log.size() > 0; i++) begin
      g = lcd.log.pop_front();
      check(g == init_seq[i], $sformatf("start-up byte %0d = %h expected %h", i, g, init_seq[i]));
    end
    lcd.log.delete();
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      x_in = 9'($urandom_range(0, 230)); y_in = 9'($urandom_range(0, 310));
      color_in = color_e'(k % 4); space = 2'(k % 4);
      side = k % 4 + 1;
      valid_in = 1;
      @(negedge clk);
      valid_in = 0;
      x_in = 9'($urandom); y_in = 9'($urandom); color_in = color_e'($urandom); space = 2'($urandom);
      cyc = 1;
      while (!ready) begin @(negedge clk); cyc++; end
      nbytes = 11 + 2 * side * side;
      check(cyc >= (nbytes - 1) * BYTE_CYC && cyc <= nbytes * BYTE_CYC + 2,
            $sformatf("draw took %0d cycles for %0d bytes", cyc, nbytes));
      repeat (BYTE_CYC + 2) @(negedge clk);
      check(lcd.log.size() == nbytes, $sformatf("draw %0d: %0d bytes expected %0d", k, lcd.log.size(), nbytes));
      if (lcd.log.size() == nbytes) begin
        x2 = 16'(lcd.log[1][7:0]) << 8 | 16'(lcd.log[2][7:0]);
        check(lcd.log[0] == 9'h02A && lcd.log[5] == 9'h02B && lcd.log[10] == 9'h02C,
              "window commands 2A, 2B, 2C");
        check({lcd.log[3][7:0], lcd.log[4][7:0]} - {lcd.log[1][7:0], lcd.log[2][7:0]} == 16'(side - 1),
              "x window is side pixels wide");
        check({lcd.log[8][7:0], lcd.log[9][7:0]} - {lcd.log[6][7:0], lcd.log[7][7:0]} == 16'(side - 1),
              "y window is side pixels high");
        pix_ok = 1;
        for (int yy = 0; yy < side; yy++)
          for (int xx = 0; xx < side; xx++)
            if (lcd.pixel_at(int'(x2) + xx, int'({lcd.log[6][7:0], lcd.log[7][7:0]}) + yy)
                != rgb(color_e'(k % 4))) pix_ok = 0;
        check(pix_ok, $sformatf("draw %0d: square filled with colour %0d", k, k % 4));
      end
      lcd.log.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
