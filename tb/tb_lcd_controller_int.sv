// tb_lcd_controller_int: self-checking test of the controller glue logic.
//
// 1. Replays a busy-read / write / busy-read sequence with nanosecond
//    timing: the BUSY flag is read (0), a character write produces a STROBE
//    for exactly the length of MEMWR, the controller then reports busy and a
//    second read returns 1.
// 2. Sweeps every upper-address value with all MEMWR/MEMRD/BUSY
//    combinations, plus random full 16-bit addresses, against a reference
//    built from the address map (selected = address below 0x0020).
`timescale 1ns/1ps
module tb_lcd_controller_int;

  logic [15:0] addr;
  logic        memwr, memrd, busy;
  logic        strobe, memdatai, rd_sel, lcd_cs;
  int unsigned checks = 0, failures = 0;

  lcd_controller_int dut (
    .memaddr (addr[15:5]),
    .memwr   (memwr),
    .memrd   (memrd),
    .busy    (busy),
    .strobe  (strobe),
    .memdatai(memdatai),
    .rd_sel  (rd_sel),
    .lcd_cs  (lcd_cs)
  );

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: addr=%h wr=%b rd=%b busy=%b got %b exp %b",
               what, addr, memwr, memrd, busy, got, exp);
    end
  endtask

  task automatic check_all();
    logic sel;
    sel = (addr < 16'h0020);
    check("lcd_cs",   lcd_cs,   sel);
    check("strobe",   strobe,   sel && memwr);
    check("rd_sel",   rd_sel,   sel && memrd);
    check("memdatai", memdatai, sel && memrd && busy);
  endtask

  // Watchdog
  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_rise;

  initial begin
    // ---- 1. timed sequence ----
    addr = 16'hFFFF; memrd = 0; memwr = 0; busy = 0;
    #100ns; check_all();
    addr = 16'h0000; #150ns; check_all();
    memrd = 1; #1ns; check("busy read 0", memdatai, 1'b0); check_all();
    #199ns; memrd = 0; #100ns; check_all();
    addr = 16'h0000; #100ns;
    memwr = 1; t_rise = $realtime; #1ns;
    check("strobe on write", strobe, 1'b1);
    #199ns; memwr = 0; #0;
    #1ns; check("strobe off after write", strobe, 1'b0);
    busy = 1; #49ns;
    addr = 16'h0000; #150ns;
    memrd = 1; #1ns; check("busy read 1", memdatai, 1'b1); check_all();
    #199ns; memrd = 0; #100ns;
    addr = 16'hFFFF; #1ns; check_all();

    // ---- 2. sweep ----
    for (int hi = 0; hi < 2048; hi++) begin
      for (int c = 0; c < 8; c++) begin
        addr  = {hi[10:0], 5'($urandom_range(0, 31))};
        {memwr, memrd, busy} = c[2:0];
        #1ns; check_all();
      end
    end
    for (int i = 0; i < 2000; i++) begin
      addr = 16'($urandom);
      {memwr, memrd, busy} = 3'($urandom);
      #1ns; check_all();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
