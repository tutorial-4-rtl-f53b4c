// tb_lcd_direct_system: end-to-end test of the direct LCD system.
//
// A bus-cycle model stands in for the CPU and a behavioural model for the
// LCD module. The test runs the software that drives the LCD through the
// RS/RW latch (0x0001) and the LCD port (0x0000):
//   read_control  : latch <- 2 (RW=1, RS=0), read 0x0000
//   wait_busy     : repeat read_control while bit 7 (busy flag) is set
//   write_control : wait_busy, latch <- 0, write 0x0000
//   write_data    : wait_busy, latch <- 1, write 0x0000
//   init sequence : instructions 0x01, 0x06, 0x0C, 0x38, 0x80
//   write_string  : set address 0x80, write characters, jumping to data-RAM
//                   position 40 (instruction 0x80+40) at the 17th character
// It checks the power-up reset, the program RAM, the LCD registers set by
// the init sequence, the text on both lines, that no write reached a busy
// LCD, that the data bus never clashed, and a read of the data RAM.
// Mechanisms counted (each must occur): busy-flag reads that found the LCD
// busy, latch writes, the jump to the second line, push-button reset.
module tb_lcd_direct_system;

  logic        clk = 1'b0;
  logic        button, cpu_rst;
  logic [15:0] romaddr;
  logic [7:0]  romdatao, romdatai;
  logic        romwr;
  logic [15:0] memaddr;
  logic [7:0]  memdatao, memdatai;
  logic        memwr, memrd;
  logic [7:0]  db_i, db_o;
  logic        db_oe, e, rw, rs, light;
  int unsigned checks = 0, failures = 0;
  int unsigned n_latch_writes = 0, n_line_jumps = 0, n_button_resets = 0;

  always #5 clk = ~clk;

  lcd_direct_system dut (
    .clk_brd(clk), .test_button(button), .cpu_rst(cpu_rst),
    .romaddr(romaddr), .romdatao(romdatao), .romwr(romwr), .romdatai(romdatai),
    .memaddr(memaddr), .memdatao(memdatao), .memwr(memwr), .memrd(memrd),
    .memdatai(memdatai),
    .lcd_db_i(db_i), .lcd_db_o(db_o), .lcd_db_oe(db_oe),
    .lcd_e(e), .lcd_rw(rw), .lcd_rs(rs), .lcd_light(light)
  );

  xbus_bfm cpu (
    .clk(clk), .memaddr(memaddr), .memdatao(memdatao), .memwr(memwr),
    .memrd(memrd), .memdatai(memdatai)
  );

  lcd_char_model lcd (
    .clk(clk), .e(e), .rw(rw), .rs(rs),
    .db_from_if(db_o), .db_if_oe(db_oe), .db_to_if(db_i)
  );

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h) exp %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  task automatic set_latch(input logic [7:0] v);
    cpu.xwrite(16'h0001, v);
    n_latch_writes++;
    chk("latched RW", int'(rw), int'(v[1]));
    chk("latched RS", int'(rs), int'(v[0]));
  endtask

  task automatic read_control(output logic [7:0] v);
    set_latch(8'h02);
    cpu.xread(16'h0000, v);
  endtask

  task automatic wait_busy();
    logic [7:0] v;
    do read_control(v); while (v[7]);
  endtask

  task automatic write_control(input logic [7:0] v);
    wait_busy();
    set_latch(8'h00);
    cpu.xwrite(16'h0000, v);
    if (v == 8'h80 + 8'd40) n_line_jumps++;
  endtask

  task automatic write_data(input logic [7:0] v);
    wait_busy();
    set_latch(8'h01);
    cpu.xwrite(16'h0000, v);
  endtask

  task automatic read_data(output logic [7:0] v);
    wait_busy();
    set_latch(8'h03);
    cpu.xread(16'h0000, v);
  endtask

  task automatic lcd_init();
    write_control(8'h01);
    write_control(8'h06);
    write_control(8'h0C);
    write_control(8'h38);
    write_control(8'h80);
  endtask

  task automatic write_string(input string s);
    write_control(8'h80);
    for (int i = 0; i < s.len(); i++) begin
      if (i == 16) write_control(8'h80 + 8'd40);
      write_data(s[i]);
    end
  endtask

  function automatic string ram_text(input int from);
    string t = "";
    for (int c = 0; c < 16; c++) t = {t, string'(lcd.ddram[from + c])};
    return t;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned rst_cycles;
    logic [7:0] v;
    string msg, l0, l1;
    button = 1'b1; romaddr = '0; romdatao = '0; romwr = 1'b0;

    // power-up reset
    rst_cycles = 0;
    #1;
    while (cpu_rst) begin
      @(posedge clk); #1; rst_cycles++;
    end
    chk("power-up reset cycles", int'(rst_cycles), 255);
    chk("backlight on", int'(light), 1);

    // program RAM over the ROM bus
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); romaddr = 16'(1023 - i * 31); romdatao = 8'(i ^ 8'hA5); romwr = 1'b1;
    end
    @(negedge clk); romwr = 1'b0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); romaddr = 16'(1023 - i * 31);
      @(posedge clk); #1; chk("program RAM readback", int'(romdatai), int'(8'(i ^ 8'hA5)));
    end

    // the display program
    lcd_init();
    chk("entry mode increment", int'(lcd.inc), 1);
    chk("display control", int'(lcd.disp_ctrl), 3'b100);
    chk("function set 8-bit 2-line", int'(lcd.func_set), 3'b110);
    chk("instructions executed", int'(lcd.n_instr), 5);
    msg = "0123456789ABCDEF<_Another_test_>";
    write_string(msg);
    l0 = ram_text(0); l1 = ram_text(40);
    checks++; if (l0 != msg.substr(0, 15)) begin failures++; $display("FAIL line 0: '%s'", l0); end
    checks++; if (l1 != msg.substr(16, 31)) begin failures++; $display("FAIL line 1: '%s'", l1); end
    chk("positions 16-39 untouched", int'(lcd.ddram[16]), 8'h20);
    write_string(".....");
    l0 = ram_text(0);
    checks++; if (l0 != ".....56789ABCDEF") begin failures++; $display("FAIL line 0 after dots: '%s'", l0); end

    // read back through the data register
    write_control(8'h80 + 8'd2);
    read_data(v); chk("data RAM read", int'(v), 8'h2E);
    read_data(v); chk("data RAM read next", int'(v), 8'h2E);
    read_data(v); chk("data RAM read third", int'(v), 8'h2E);
    read_data(v); chk("data RAM read fourth", int'(v), 8'h35);

    // a read of 0x0000 while RW=0 must return nothing and drive nothing
    set_latch(8'h00);
    cpu.xread(16'h0000, v); chk("read with RW=0 returns 0", int'(v), 0);
    // addresses outside 0x0000-0x0001 reach neither latch nor LCD
    cpu.xwrite(16'h0003, 8'h02); chk("latch untouched", int'(rw), 0);
    cpu.xwrite(16'h0100, 8'h41);
    chk("data writes", int'(lcd.n_data), 37);

    chk("LCD overruns", int'(lcd.overruns), 0);
    chk("data bus clashes", int'(lcd.clashes), 0);

    // push button reset clears the latch
    set_latch(8'h03);
    @(negedge clk); button = 1'b0; #1;
    chk("reset while button pressed", int'(cpu_rst), 1);
    chk("latch cleared by reset", int'({rw, rs}), 0);
    @(negedge clk); button = 1'b1; #1;
    chk("reset released", int'(cpu_rst), 0);
    n_button_resets++;

    chk("mechanism: busy-flag reads found busy", int'(lcd.n_bf_busy > 0), 1);
    chk("mechanism: latch writes", int'(n_latch_writes > 0), 1);
    chk("mechanism: jump to position 40", int'(n_line_jumps > 0), 1);
    chk("mechanism: button reset", int'(n_button_resets > 0), 1);
    $display("busy-flag reads %0d (busy %0d), latch writes %0d, line jumps %0d",
             lcd.n_bf_read, lcd.n_bf_busy, n_latch_writes, n_line_jumps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
