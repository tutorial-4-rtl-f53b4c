// tb_lcd_ctrl_system: end-to-end test of the controller-based LCD system.
//
// A bus-cycle model stands in for the CPU and a behavioural controller
// model for the external LCD controller. The test:
//   1. checks the power-up reset lasts 255 clocks,
//   2. writes and reads back the program RAM over the ROM bus,
//   3. runs the flashing-message program: for every character it polls the
//      BUSY flag at 0x0000 until it reads 0, then writes the character to
//      address i (0x00-0x0F line 0, 0x10-0x1F line 1); first the full
//      32-character message, then "....." over its start,
//   4. checks the screen image, that no write hit a busy controller, that
//      reads outside 0x0000-0x001F return 0 and writes there reach nothing,
//   5. presses the push button and checks reset reaches CPU and controller.
// Mechanisms counted (each must occur): busy polls that found the
// controller busy, characters written to line 1, push-button reset.
module tb_lcd_ctrl_system;

  logic        clk = 1'b0;
  logic        button;
  logic        cpu_rst;
  logic [15:0] romaddr;
  logic [7:0]  romdatao, romdatai;
  logic        romwr;
  logic [15:0] memaddr;
  logic [7:0]  memdatao, memdatai;
  logic        memwr, memrd;
  logic [7:0]  c_data;
  logic [3:0]  c_addr;
  logic        c_line, c_strobe, c_busy, light;
  int unsigned checks = 0, failures = 0;
  int unsigned n_busy_polls = 0, n_button_resets = 0;

  always #5 clk = ~clk;

  lcd_ctrl_system dut (
    .clk_brd(clk), .test_button(button), .cpu_rst(cpu_rst),
    .romaddr(romaddr), .romdatao(romdatao), .romwr(romwr), .romdatai(romdatai),
    .memaddr(memaddr), .memdatao(memdatao), .memwr(memwr), .memrd(memrd),
    .memdatai(memdatai),
    .lcd_ctrl_data(c_data), .lcd_ctrl_addr(c_addr), .lcd_ctrl_line(c_line),
    .lcd_ctrl_strobe(c_strobe), .lcd_ctrl_busy(c_busy), .lcd_light(light)
  );

  xbus_bfm cpu (
    .clk(clk), .memaddr(memaddr), .memdatao(memdatao), .memwr(memwr),
    .memrd(memrd), .memdatai(memdatai)
  );

  lcd16x2a_model ctrl (
    .clk(clk), .rst(cpu_rst), .data(c_data), .addr(c_addr), .line(c_line),
    .strobe(c_strobe), .busy(c_busy)
  );

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h) exp %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  // The test program's string writer: poll BUSY, then write character i.
  task automatic write_string(input string s);
    logic [7:0] st;
    for (int i = 0; i < s.len(); i++) begin
      forever begin
        cpu.xread(16'h0000, st);
        chk("read data bits 7:1", int'(st[7:1]), 0);
        if (st[0] == 1'b0) break;
        n_busy_polls++;
      end
      cpu.xwrite(16'(i), s[i]);
    end
  endtask

  function automatic string line_text(input int l);
    string t = "";
    for (int c = 0; c < 16; c++) t = {t, string'(ctrl.screen[l][c])};
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
    logic [7:0] rd;
    string msg, l0, l1;
    button = 1'b1; romaddr = '0; romdatao = '0; romwr = 1'b0;

    // 1. power-up reset length
    rst_cycles = 0;
    #1;
    while (cpu_rst) begin
      @(posedge clk); #1; rst_cycles++;
    end
    chk("power-up reset cycles", int'(rst_cycles), 255);
    chk("backlight on", int'(light), 1);

    // 2. program RAM over the ROM bus
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); romaddr = 16'(i * 16 + 3); romdatao = 8'(i * 5 + 1); romwr = 1'b1;
    end
    @(negedge clk); romwr = 1'b0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); romaddr = 16'(i * 16 + 3);
      @(posedge clk); #1; chk("program RAM readback", int'(romdatai), (i * 5 + 1) % 256);
    end

    // 3. the display program
    msg = "0123456789ABCDEF<This is a test>";
    write_string(msg);
    repeat (20) @(posedge clk);
    l0 = line_text(0); l1 = line_text(1);
    checks++; if (l0 != msg.substr(0, 15)) begin failures++; $display("FAIL line 0: '%s'", l0); end
    checks++; if (l1 != msg.substr(16, 31)) begin failures++; $display("FAIL line 1: '%s'", l1); end
    chk("characters written", int'(ctrl.n_chars), 32);
    write_string(".....");
    repeat (20) @(posedge clk);
    l0 = line_text(0);
    checks++; if (l0 != ".....56789ABCDEF") begin failures++; $display("FAIL line 0 after dots: '%s'", l0); end
    chk("controller overruns", int'(ctrl.overruns), 0);

    // 4. outside the address range
    cpu.xwrite(16'h0020, 8'h41);
    cpu.xwrite(16'h8003, 8'h41);
    repeat (20) @(posedge clk);
    chk("no write outside range", int'(ctrl.n_chars), 37);
    cpu.xwrite(16'h001F, 8'h21);       // last address, busy afterwards
    cpu.xread(16'h0020, rd); chk("read outside range", int'(rd), 0);
    cpu.xread(16'h001F, rd); chk("busy at last address", int'(rd), 1);
    repeat (20) @(posedge clk);
    chk("last character", int'(ctrl.screen[1][15]), 8'h21);

    // 5. push button reset
    @(negedge clk); button = 1'b0; #1;
    chk("reset while button pressed", int'(cpu_rst), 1);
    repeat (3) @(posedge clk);
    @(negedge clk); button = 1'b1; #1;
    chk("reset released", int'(cpu_rst), 0);
    n_button_resets++;
    chk("screen cleared by reset", int'(ctrl.screen[0][0]), 8'h20);
    cpu.xread(16'h0005, rd); chk("busy during controller init", int'(rd), 1);

    chk("mechanism: busy polls that found BUSY", int'(n_busy_polls > 0), 1);
    chk("mechanism: line 1 writes", int'(ctrl.n_line1 > 0), 1);
    chk("mechanism: button reset", int'(n_button_resets > 0), 1);
    $display("busy polls %0d, line-1 writes %0d, bus writes %0d, bus reads %0d",
             n_busy_polls, ctrl.n_line1, cpu.n_writes, cpu.n_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
