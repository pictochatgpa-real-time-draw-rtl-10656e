// tb_pictochat_top: two boards, A and B, at their default parameters, each
// with a model of the touch controller and of the display, linked through a
// model of the Bluetooth modules and the relaying host.
//
// Sequence: both displays start up; A presses button 3 three times (colour
// black -> white -> red -> blue, shown as "03" on its seven-segment display),
// A has switch 15 high (2x2 brush) and B low (4x4 brush). A finger on A at
// (37, 90) paints a blue 2x2 square on A; A presses button 1 and B paints a
// blue 4x4 square at (37, 90). B is touched at (200, 150) and paints black
// 4x4; B sends and A paints a black 2x2 square there. Finally A's button 0
// resets A, which restarts its display and returns its colour to black.
//
// Each mechanism is counted and must occur: display start-up, colour step,
// I2C position read, local draw, message sent, message received and drawn,
// 2x2 and 4x4 brushes, a draw waiting for a busy display, reset by button.
module tb_pictochat_top;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- board A ----------------
  logic [3:0] btn_a = 0;
  logic       sw_a = 1, irq_a = 1;
  logic       scl_a, sda_oe_a, sda_a, pull_a;
  logic       sclk_a, mosi_a, cs_a, dc_a, lrst_a;
  logic       tx_a, rx_a, cts_a;
  logic [1:0] an_a;
  logic [6:0] seg_a;
  logic [11:0] tx_pos_a = 12'd37, ty_pos_a = 12'd90;
  int         reads_a;
  logic [7:0] ptr_a;

  assign sda_a = !(sda_oe_a || pull_a);

  pictochat_top board_a (
    .clk, .btn(btn_a), .sw15(sw_a),
    .i2c_scl(scl_a), .i2c_sda_in(sda_a), .i2c_sda_oe(sda_oe_a), .touch_irq_n(irq_a),
    .spi_sclk(sclk_a), .spi_mosi(mosi_a), .spi_cs_n(cs_a), .spi_dc(dc_a), .lcd_rst_n(lrst_a),
    .ble_uart_rx(rx_a), .ble_uart_tx(tx_a), .ble_uart_rts(1'b0), .ble_uart_cts(cts_a),
    .ss_an(an_a), .ss_seg(seg_a));
  touch_panel_model panel_a (.scl(scl_a), .sda(sda_a), .sda_pull(pull_a),
    .touch_x(tx_pos_a), .touch_y(ty_pos_a), .reads(reads_a), .last_ptr(ptr_a));
  lcd_model lcd_a (.sclk(sclk_a), .mosi(mosi_a), .cs_n(cs_a), .dc(dc_a), .rst_n(lrst_a));

  // ---------------- board B ----------------
  logic [3:0] btn_b = 0;
  logic       sw_b = 0, irq_b = 1;
  logic       scl_b, sda_oe_b, sda_b, pull_b;
  logic       sclk_b, mosi_b, cs_b, dc_b, lrst_b;
  logic       tx_b, rx_b, cts_b;
  logic [1:0] an_b;
  logic [6:0] seg_b;
  logic [11:0] tx_pos_b = 12'd200, ty_pos_b = 12'd150;
  int         reads_b;
  logic [7:0] ptr_b;

  assign sda_b = !(sda_oe_b || pull_b);

  pictochat_top board_b (
    .clk, .btn(btn_b), .sw15(sw_b),
    .i2c_scl(scl_b), .i2c_sda_in(sda_b), .i2c_sda_oe(sda_oe_b), .touch_irq_n(irq_b),
    .spi_sclk(sclk_b), .spi_mosi(mosi_b), .spi_cs_n(cs_b), .spi_dc(dc_b), .lcd_rst_n(lrst_b),
    .ble_uart_rx(rx_b), .ble_uart_tx(tx_b), .ble_uart_rts(1'b0), .ble_uart_cts(cts_b),
    .ss_an(an_b), .ss_seg(seg_b));
  touch_panel_model panel_b (.scl(scl_b), .sda(sda_b), .sda_pull(pull_b),
    .touch_x(tx_pos_b), .touch_y(ty_pos_b), .reads(reads_b), .last_ptr(ptr_b));
  lcd_model lcd_b (.sclk(sclk_b), .mosi(mosi_b), .cs_n(cs_b), .dc(dc_b), .rst_n(lrst_b));

  // ---------------- Bluetooth path ----------------
  int relayed_ab, relayed_ba;
  ble_host_model host_ab (.clk, .from_tx(tx_a), .to_rx(rx_b), .relayed(relayed_ab));
  ble_host_model host_ba (.clk, .from_tx(tx_b), .to_rx(rx_a), .relayed(relayed_ba));

  // ---------------- mechanism counters ----------------
  int n_color_steps = 0, n_local_draw = 0, n_remote_draw = 0, n_wait_busy = 0;
  int n_pos = 0, n_init = 0, n_sent = 0, n_brush2 = 0, n_brush4 = 0;
  logic [1:0] col_q = 0;

  always @(posedge clk) begin
    if (board_a.u_color.color != col_q && !board_a.sys_rst) n_color_steps++;
    col_q <= board_a.u_color.color;
    foreach_board(board_a.u_inputs.draw_valid, board_a.u_inputs.display_ready,
                  board_a.u_inputs.draw_is_remote, board_a.brush_space);
    foreach_board(board_b.u_inputs.draw_valid, board_b.u_inputs.display_ready,
                  board_b.u_inputs.draw_is_remote, board_b.brush_space);
    if (board_a.touch_valid || board_b.touch_valid) n_pos++;
    if (board_a.u_display.state == 2'd1 && board_a.u_display.init_idx == 0 &&
        board_a.u_display.spi_valid) n_init++;
    if (board_b.u_display.state == 2'd1 && board_b.u_display.init_idx == 0 &&
        board_b.u_display.spi_valid) n_init++;
    if ((board_a.u_bt_tx.idx == 3'd3 && board_a.u_bt_tx.byte_valid && board_a.u_bt_tx.byte_ready) ||
        (board_b.u_bt_tx.idx == 3'd3 && board_b.u_bt_tx.byte_valid && board_b.u_bt_tx.byte_ready))
      n_sent++;
  end

  function automatic void foreach_board(logic v, logic r, logic remote, logic [1:0] sp);
    if (v && r) begin
      if (remote) n_remote_draw++; else n_local_draw++;
      if (sp == 2'd1) n_brush2++; else n_brush4++;
    end
    if (v && !r) n_wait_busy++;
  endfunction

  task automatic press(ref logic [3:0] b, input int k);
    b[k] = 1;
    repeat (1_100_000) @(posedge clk);
    b[k] = 0;
    repeat (1_100_000) @(posedge clk);
  endtask

  function automatic bit square_is(int which, int x, int y, int side, logic [15:0] c);
    for (int yy = 0; yy < side; yy++)
      for (int xx = 0; xx < side; xx++)
        if ((which == 0 ? lcd_a.pixel_at(x + xx, y + yy) : lcd_b.pixel_at(x + xx, y + yy)) != c)
          return 0;
    return 1;
  endfunction

  task automatic touch_once(input bit on_a);
    if (on_a) irq_a = 0; else irq_b = 0;
    if (on_a) @(posedge board_a.touch_valid); else @(posedge board_b.touch_valid);
    if (on_a) irq_a = 1; else irq_b = 1;
    repeat (200_000) @(posedge clk);   // let any read in flight finish
  endtask

  // latency probes
  longint t_irq, t_pos, t_send, t_rx;
  initial begin
    @(negedge irq_a); t_irq = $time / 10;
    @(posedge board_a.touch_valid); t_pos = $time / 10;
    @(posedge board_a.btn1_clean); t_send = $time / 10;
    @(posedge board_b.u_bt_rx.valid_out); t_rx = $time / 10;
  end

  initial begin
    int seen_right;
    // both displays start up
    wait (board_a.u_display.init_done && board_b.u_display.init_done);
    repeat (1_000) @(posedge clk);     // last byte still on the wire
    check(lcd_a.log.size() == 49 && lcd_b.log.size() == 49, "start-up bytes on both displays");
    // colour: three presses of button 3 on A
    for (int i = 0; i < 3; i++) press(btn_a, 3);
    check(board_a.u_color.color == 2'd3, "A colour is blue");
    seen_right = 0;
    repeat (300_000) begin
      @(posedge clk);
      if (an_a == 2'b10 && seg_a == ~7'h4F) seen_right = 1;
    end
    check(seen_right == 1, "A seven-segment shows 3");
    // touch on A: local 2x2 blue square
    touch_once(1);
    repeat (100_000) @(posedge clk);
    check(square_is(0, 37, 90, 2, 16'h001F), "A drew blue 2x2 at (37,90)");
    // send from A: B draws blue 4x4
    press(btn_a, 1);
    repeat (200_000) @(posedge clk);
    check(relayed_ab == 4, $sformatf("4 bytes relayed A->B, got %0d", relayed_ab));
    check(square_is(1, 37, 90, 4, 16'h001F), "B drew blue 4x4 at (37,90)");
    $display("latency: touch to position %0d cycles, send to message decoded on B %0d cycles",
             t_pos - t_irq, t_rx - t_send);
    check(t_pos - t_irq >= 164_000 && t_pos - t_irq <= 164_100,
          "position about 4 x 41,000 cycles after the interrupt");
    check(t_rx - t_send >= 80 * 868 && t_rx - t_send <= 82 * 868,
          "message decoded about 80.5 baud periods after the send press");
    // touch on B: local 4x4 black; send to A: 2x2 black
    touch_once(0);
    repeat (100_000) @(posedge clk);
    check(square_is(1, 200, 150, 4, 16'h0000), "B drew black 4x4 at (200,150)");
    press(btn_b, 1);
    repeat (200_000) @(posedge clk);
    check(relayed_ba == 4, "4 bytes relayed B->A");
    check(square_is(0, 200, 150, 2, 16'h0000), "A drew black 2x2 at (200,150)");
    check(!square_is(0, 200, 150, 3, 16'h0000), "A's square is only 2x2");
    // reset A with button 0
    press(btn_a, 0);
    repeat (600_000) @(posedge clk);
    check(board_a.u_color.color == 2'd0, "A colour back to black after reset");
    check(board_a.u_display.init_done, "A display started up again");

    check(n_init == 3, $sformatf("display start-ups: %0d", n_init));
    check(n_color_steps >= 3, $sformatf("colour steps: %0d", n_color_steps));
    check(n_pos >= 2, $sformatf("touch positions: %0d", n_pos));
    check(reads_a >= 4 && reads_b >= 4, "I2C register reads on both boards");
    check(n_local_draw >= 2, $sformatf("local draws: %0d", n_local_draw));
    check(n_remote_draw == 2, $sformatf("remote draws: %0d", n_remote_draw));
    check(n_sent == 2, $sformatf("messages sent: %0d", n_sent));
    check(n_brush2 >= 1 && n_brush4 >= 1, $sformatf("2x2 draws %0d, 4x4 draws %0d", n_brush2, n_brush4));
    check(n_wait_busy >= 1, $sformatf("cycles a draw waited for the display: %0d", n_wait_busy));
    $display("mechanisms: startups=%0d colour_steps=%0d positions=%0d local=%0d remote=%0d sent=%0d brush2=%0d brush4=%0d wait=%0d",
             n_init, n_color_steps, n_pos, n_local_draw, n_remote_draw, n_sent, n_brush2, n_brush4, n_wait_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
