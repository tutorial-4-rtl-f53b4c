// tb_lcd_io_top: end-to-end test of both LCD systems in lcd_io_top, at the
// top's default parameters.
//
// The two systems run at the same time, each with its own clock, a bus-cycle
// model in place of its CPU and a behavioural model of what sits on its LCD
// pins:
//   controller system: the flashing-message program. Each character is
//     written to address i in 0x0000-0x001F after polling BUSY; the message
//     is written, then "....." over it, twice (two flashes).
//   direct system: the LCD driver program. Initialisation (0x01, 0x06,
//     0x0C, 0x38, 0x80), then the message with the jump to data-RAM
//     position 40 for the second line, then ".....", twice. Every register
//     access goes through the RS/RW latch and waits for the busy flag.
// Checks: power-up reset length on both, screen / data-RAM contents after
// each string, no write into a busy controller or LCD, no data-bus clash.
// Mechanisms counted, each must occur at least once: controller busy polls
// that found BUSY, controller line-1 writes, LCD busy-flag reads that found
// it busy, latch writes, jumps to position 40, push-button resets.
module tb_lcd_io_top;

  logic        cclk = 1'b0, dclk = 1'b0;
  logic        cbtn, dbtn, crst, drst;
  logic [15:0] c_romaddr, d_romaddr;
  logic [7:0]  c_romdatao, c_romdatai, d_romdatao, d_romdatai;
  logic        c_romwr, d_romwr;
  logic [15:0] c_addr, d_addr;
  logic [7:0]  c_do, c_di, d_do, d_di;
  logic        c_wr, c_rd, d_wr, d_rd;
  logic [7:0]  cc_data;
  logic [3:0]  cc_addr;
  logic        cc_line, cc_strobe, cc_busy, c_light;
  logic [7:0]  db_i, db_o;
  logic        db_oe, e, rw, rs, d_light;
  int unsigned checks = 0, failures = 0;
  int unsigned n_ctl_busy_polls = 0, n_latch_writes = 0, n_line_jumps = 0;
  int unsigned n_button_resets = 0;

  always #5 cclk = ~cclk;   // 100 MHz
  always #7 dclk = ~dclk;   // an unrelated clock for the other system

  lcd_io_top dut (
    .ctl_clk_brd(cclk), .ctl_test_button(cbtn), .ctl_cpu_rst(crst),
    .ctl_romaddr(c_romaddr), .ctl_romdatao(c_romdatao), .ctl_romwr(c_romwr),
    .ctl_romdatai(c_romdatai),
    .ctl_memaddr(c_addr), .ctl_memdatao(c_do), .ctl_memwr(c_wr), .ctl_memrd(c_rd),
    .ctl_memdatai(c_di),
    .ctl_lcd_ctrl_data(cc_data), .ctl_lcd_ctrl_addr(cc_addr),
    .ctl_lcd_ctrl_line(cc_line), .ctl_lcd_ctrl_strobe(cc_strobe),
    .ctl_lcd_ctrl_busy(cc_busy), .ctl_lcd_light(c_light),
    .dir_clk_brd(dclk), .dir_test_button(dbtn), .dir_cpu_rst(drst),
    .dir_romaddr(d_romaddr), .dir_romdatao(d_romdatao), .dir_romwr(d_romwr),
    .dir_romdatai(d_romdatai),
    .dir_memaddr(d_addr), .dir_memdatao(d_do), .dir_memwr(d_wr), .dir_memrd(d_rd),
    .dir_memdatai(d_di),
    .dir_lcd_db_i(db_i), .dir_lcd_db_o(db_o), .dir_lcd_db_oe(db_oe),
    .dir_lcd_e(e), .dir_lcd_rw(rw), .dir_lcd_rs(rs), .dir_lcd_light(d_light)
  );

  xbus_bfm ccpu (.clk(cclk), .memaddr(c_addr), .memdatao(c_do), .memwr(c_wr),
                 .memrd(c_rd), .memdatai(c_di));
  xbus_bfm dcpu (.clk(dclk), .memaddr(d_addr), .memdatao(d_do), .memwr(d_wr),
                 .memrd(d_rd), .memdatai(d_di));

  lcd16x2a_model ctrl (.clk(cclk), .rst(crst), .data(cc_data), .addr(cc_addr),
                       .line(cc_line), .strobe(cc_strobe), .busy(cc_busy));
  lcd_char_model lcd (.clk(dclk), .e(e), .rw(rw), .rs(rs),
                      .db_from_if(db_o), .db_if_oe(db_oe), .db_to_if(db_i));

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h) exp %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  task automatic chk_str(input string what, input string got, input string exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got '%s' exp '%s'", what, got, exp);
    end
  endtask

  // ---------------- controller system software ----------------
  task automatic ctl_write_string(input string s);
    logic [7:0] st;
    for (int i = 0; i < s.len(); i++) begin
      forever begin
        ccpu.xread(16'h0000, st);
        if (st[0] == 1'b0) break;
        n_ctl_busy_polls++;
      end
      ccpu.xwrite(16'(i), s[i]);
    end
  endtask

  function automatic string ctl_line(input int l);
    string t = "";
    for (int c = 0; c < 16; c++) t = {t, string'(ctrl.screen[l][c])};
    return t;
  endfunction

  // ---------------- direct system software ----------------
  task automatic set_latch(input logic [7:0] v);
    dcpu.xwrite(16'h0001, v);
    n_latch_writes++;
  endtask

  task automatic wait_busy();
    logic [7:0] v;
    do begin
      set_latch(8'h02);
      dcpu.xread(16'h0000, v);
    end while (v[7]);
  endtask

  task automatic write_control(input logic [7:0] v);
    wait_busy();
    set_latch(8'h00);
    dcpu.xwrite(16'h0000, v);
    if (v == 8'h80 + 8'd40) n_line_jumps++;
  endtask

  task automatic write_data(input logic [7:0] v);
    wait_busy();
    set_latch(8'h01);
    dcpu.xwrite(16'h0000, v);
  endtask

  task automatic dir_write_string(input string s);
    write_control(8'h80);
    for (int i = 0; i < s.len(); i++) begin
      if (i == 16) write_control(8'h80 + 8'd40);
      write_data(s[i]);
    end
  endtask

  function automatic string dir_line(input int from);
    string t = "";
    for (int c = 0; c < 16; c++) t = {t, string'(lcd.ddram[from + c])};
    return t;
  endfunction

  initial begin
    repeat (400000) @(posedge cclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam string CTL_MSG = "0123456789ABCDEF<This is a test>";
  localparam string DIR_MSG = "0123456789ABCDEF<_Another_test_>";

  initial begin
    cbtn = 1'b1; dbtn = 1'b1;
    c_romaddr = '0; c_romdatao = '0; c_romwr = 1'b0;
    d_romaddr = '0; d_romdatao = '0; d_romwr = 1'b0;
    fork
      // ---- controller system ----
      begin
        int unsigned n = 0;
        #1;
        while (crst) begin @(posedge cclk); #1; n++; end
        chk("controller system power-up reset cycles", int'(n), 255);
        chk("controller system backlight", int'(c_light), 1);
        // a word through its program RAM
        @(negedge cclk); c_romaddr = 16'h03FF; c_romdatao = 8'h5A; c_romwr = 1'b1;
        @(negedge cclk); c_romwr = 1'b0;
        @(posedge cclk); #1; chk("controller system program RAM", int'(c_romdatai), 8'h5A);
        for (int flash = 0; flash < 2; flash++) begin
          ctl_write_string(CTL_MSG);
          repeat (20) @(posedge cclk);
          chk_str("controller line 0", ctl_line(0), CTL_MSG.substr(0, 15));
          chk_str("controller line 1", ctl_line(1), CTL_MSG.substr(16, 31));
          ctl_write_string(".....");
          repeat (20) @(posedge cclk);
          chk_str("controller line 0 dots", ctl_line(0), ".....56789ABCDEF");
        end
        chk("controller characters", int'(ctrl.n_chars), 74);
        chk("controller overruns", int'(ctrl.overruns), 0);
        // push-button reset
        @(negedge cclk); cbtn = 1'b0; #1; chk("controller system button reset", int'(crst), 1);
        repeat (2) @(posedge cclk);
        @(negedge cclk); cbtn = 1'b1; #1; chk("controller system reset released", int'(crst), 0);
        n_button_resets++;
      end
      // ---- direct system ----
      begin
        int unsigned n = 0;
        #1;
        while (drst) begin @(posedge dclk); #1; n++; end
        chk("direct system power-up reset cycles", int'(n), 255);
        chk("direct system backlight", int'(d_light), 1);
        @(negedge dclk); d_romaddr = 16'h0000; d_romdatao = 8'hC3; d_romwr = 1'b1;
        @(negedge dclk); d_romwr = 1'b0;
        @(posedge dclk); #1; chk("direct system program RAM", int'(d_romdatai), 8'hC3);
        write_control(8'h01);
        write_control(8'h06);
        write_control(8'h0C);
        write_control(8'h38);
        write_control(8'h80);
        chk("LCD entry mode", int'(lcd.inc), 1);
        chk("LCD display control", int'(lcd.disp_ctrl), 3'b100);
        chk("LCD function set", int'(lcd.func_set), 3'b110);
        for (int flash = 0; flash < 2; flash++) begin
          dir_write_string(DIR_MSG);
          chk_str("LCD line 0", dir_line(0), DIR_MSG.substr(0, 15));
          chk_str("LCD line 1", dir_line(40), DIR_MSG.substr(16, 31));
          dir_write_string(".....");
          chk_str("LCD line 0 dots", dir_line(0), ".....56789ABCDEF");
        end
        chk("LCD data writes", int'(lcd.n_data), 74);
        chk("LCD overruns", int'(lcd.overruns), 0);
        chk("LCD data bus clashes", int'(lcd.clashes), 0);
        set_latch(8'h03);
        @(negedge dclk); dbtn = 1'b0; #1;
        chk("direct system button reset", int'(drst), 1);
        chk("latch cleared by reset", int'({rw, rs}), 0);
        @(negedge dclk); dbtn = 1'b1; #1; chk("direct system reset released", int'(drst), 0);
        n_button_resets++;
      end
    join

    chk("mechanism: controller BUSY seen by polling", int'(n_ctl_busy_polls > 0), 1);
    chk("mechanism: controller line-1 writes", int'(ctrl.n_line1 > 0), 1);
    chk("mechanism: LCD busy flag seen set", int'(lcd.n_bf_busy > 0), 1);
    chk("mechanism: RS/RW latch writes", int'(n_latch_writes > 0), 1);
    chk("mechanism: jump to position 40", int'(n_line_jumps > 0), 1);
    chk("mechanism: push-button resets", int'(n_button_resets == 2), 1);
    $display("controller: busy polls %0d, line-1 writes %0d; direct: busy-flag reads %0d (busy %0d), latch writes %0d, line jumps %0d",
             n_ctl_busy_polls, ctrl.n_line1, lcd.n_bf_read, lcd.n_bf_busy,
             n_latch_writes, n_line_jumps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
