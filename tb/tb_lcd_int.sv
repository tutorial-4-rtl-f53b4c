// tb_lcd_int: self-checking test of the direct LCD interface glue logic.
//
// 1. Reset clears the RS/RW latch.
// 2. A timed sequence in nanoseconds, as software issues it when it sets an
//    LCD register: write 0x02 to the latch (RW=1, RS=0), read the busy flag
//    at 0x0000, write 0x00 to the latch, write instruction 0x01 to 0x0000.
//    LCD_E must follow MEMRD/MEMWR, the data bus must only be driven with
//    RW=0, and read data must only come back with RW=1.
// 3. 4000 random bus operations (random addresses biased to 0x0000/0x0001,
//    random data and strobes) against a reference model of the latch and
//    the routing rules.
`timescale 1ns/1ps
module tb_lcd_int;

  logic        rst;
  logic [15:0] addr;
  logic [7:0]  dout, din, db_i, db_o;
  logic        memwr, memrd, rd_sel, lcd_cs, db_oe, e, rw, rs;
  int unsigned checks = 0, failures = 0;
  logic        ref_rw, ref_rs;

  lcd_int dut (
    .rst      (rst),
    .memaddr  (addr),
    .memdatao (dout),
    .memwr    (memwr),
    .memrd    (memrd),
    .memdatai (din),
    .rd_sel   (rd_sel),
    .lcd_cs   (lcd_cs),
    .lcd_db_i (db_i),
    .lcd_db_o (db_o),
    .lcd_db_oe(db_oe),
    .lcd_e    (e),
    .lcd_rw   (rw),
    .lcd_rs   (rs)
  );

  task automatic chk(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: addr=%h wr=%b rd=%b rw=%b got %h exp %h",
               what, addr, memwr, memrd, rw, got, exp);
    end
  endtask

  // Reference of every output from the bus state and the reference latch.
  task automatic check_all();
    logic cs, s_lcd;
    cs    = (addr[15:1] == 15'd0);
    s_lcd = cs && !addr[0];
    chk("lcd_cs",  8'(lcd_cs), 8'(cs));
    chk("lcd_rw",  8'(rw),     8'(ref_rw));
    chk("lcd_rs",  8'(rs),     8'(ref_rs));
    chk("lcd_e",   8'(e),      8'(s_lcd && (memrd || memwr)));
    chk("db_oe",   8'(db_oe),  8'(s_lcd && !ref_rw));
    chk("rd_sel",  8'(rd_sel), 8'(s_lcd && memrd && ref_rw));
    chk("memdatai", din, (s_lcd && memrd && ref_rw) ? db_i : 8'h00);
    if (db_oe) chk("lcd_db_o", db_o, dout);
  endtask

  // Reference latch: loads when MEMWR falls with 0x0001 addressed.
  always @(negedge memwr or posedge rst) begin
    if (rst) begin
      ref_rw <= 1'b0; ref_rs <= 1'b0;
    end else if (addr == 16'h0001) begin
      ref_rw <= dout[1]; ref_rs <= dout[0];
    end
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned n_clash_guard = 0;

  initial begin
    rst = 0; addr = 16'hFFFF; dout = 8'h00; db_i = 8'h00; memwr = 0; memrd = 0;
    // ---- 1. reset ----
    #10ns; rst = 1; #10ns; rst = 0; #1ns;
    chk("rw after reset", 8'(rw), 8'h0);
    chk("rs after reset", 8'(rs), 8'h0);
    #80ns; check_all();

    // ---- 2. timed register-setting sequence ----
    addr = 16'h0001; #100ns;
    dout = 8'h02; #50ns; memwr = 1; #1ns; check_all();
    chk("no E on latch write", 8'(e), 8'h0);
    #199ns; memwr = 0; #1ns;
    chk("latched RW", 8'(rw), 8'h1); chk("latched RS", 8'(rs), 8'h0);
    #49ns; dout = 8'h00; #90ns;
    addr = 16'h0000; #150ns; check_all();
    chk("db not driven in read mode", 8'(db_oe), 8'h0);
    memrd = 1; #10ns; db_i = 8'h00; #1ns;
    chk("E during read", 8'(e), 8'h1);
    chk("busy flag read", din, 8'h00); check_all();
    db_i = 8'h80; #1ns; chk("busy flag read set", din, 8'h80);
    #188ns; memrd = 0; #1ns; chk("E after read", 8'(e), 8'h0); check_all();
    #9ns; db_i = 8'h00; #90ns;
    addr = 16'h0001; #100ns;
    dout = 8'h00; #50ns; memwr = 1; #200ns; memwr = 0; #1ns;
    chk("latched RW=0", 8'(rw), 8'h0); chk("latched RS=0", 8'(rs), 8'h0);
    #49ns; dout = 8'h00; #90ns;
    addr = 16'h0000; #100ns;
    dout = 8'h01; #1ns;
    chk("db driven in write mode", 8'(db_oe), 8'h1);
    chk("db value", db_o, 8'h01);
    #49ns; memwr = 1; #1ns; chk("E during write", 8'(e), 8'h1); check_all();
    #199ns; memwr = 0; #1ns; chk("E after write", 8'(e), 8'h0);
    chk("latch untouched by LCD write", {6'd0, rw, rs}, 8'h00);
    #49ns; dout = 8'h00; #90ns; addr = 16'hFFFF; #100ns; check_all();

    // ---- 3. random ----
    for (int i = 0; i < 4000; i++) begin
      int unsigned k;
      k = $urandom_range(0, 9);
      addr = (k < 4) ? 16'h0000 : (k < 8) ? 16'h0001 : 16'($urandom);
      dout = 8'($urandom);
      db_i = 8'($urandom);
      #5ns; check_all();
      if ($urandom_range(0, 1) == 1) memwr = 1; else memrd = 1;
      #5ns; check_all();
      if (addr == 16'h0000 && memrd && !rw) n_clash_guard++;
      memwr = 0; memrd = 0;
      #5ns; check_all();
      if ($urandom_range(0, 199) == 0) begin
        rst = 1; #5ns; rst = 0; #1ns; check_all();
      end
    end
    chk("read with RW=0 happened", 8'(n_clash_guard > 0), 8'h1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
