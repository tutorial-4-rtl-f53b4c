// lcd_direct_system: the LCD system without a controller, where an
// 8051-class CPU drives the LCD module through the lcd_int glue logic.
//
// The CPU and the LCD module are external; their pins are the ports here.
// Inside are:
//   * reset generation: power-up pulse (fpga_startup8, delay all ones) ORed
//     with the inverted push button, driving cpu_rst. The same reset also
//     clears the RS/RW latch of lcd_int.
//   * program memory (rams_8x1k) on the CPU ROM bus, romaddr[9:0].
//   * lcd_int on the external data bus: 0x0000 is the LCD (instruction or
//     data register, chosen by RS), 0x0001 the RS/RW latch. Software writes
//     the latch first, then reads or writes 0x0000; LCD_E follows the CPU
//     strobe. The LCD data bus leaves as lcd_db_o/lcd_db_oe/lcd_db_i for
//     the pad buffer.
//   * lcd_light is tied high (backlight always on).
// The structure follows the tutorial's top-level schematic; the reset of
// the latch and the read multiplexer are this design's choices.
module lcd_direct_system
  import lcd_io_pkg::*;
(
  input  logic               clk_brd,
  input  logic               test_button,     // active low push button
  output logic               cpu_rst,
  // CPU program (ROM) bus
  input  logic [XADDR_W-1:0] romaddr,
  input  logic [PROG_DW-1:0] romdatao,
  input  logic               romwr,
  output logic [PROG_DW-1:0] romdatai,
  // CPU external data bus
  input  logic [XADDR_W-1:0] memaddr,
  input  logic [XDATA_W-1:0] memdatao,
  input  logic               memwr,
  input  logic               memrd,
  output logic [XDATA_W-1:0] memdatai,
  // LCD module pins
  input  logic [XDATA_W-1:0] lcd_db_i,
  output logic [XDATA_W-1:0] lcd_db_o,
  output logic               lcd_db_oe,
  output logic               lcd_e,
  output logic               lcd_rw,
  output logic               lcd_rs,
  output logic               lcd_light
);

  logic               init;
  logic [XDATA_W-1:0] glue_rd;
  logic               glue_rd_sel;

  fpga_startup8 u_startup (
    .clk  (clk_brd),
    .delay(STARTUP_DELAY),
    .init (init)
  );

  assign cpu_rst = init | ~test_button;

  rams_8x1k #(.AW(PROG_AW), .DW(PROG_DW)) u_prog_ram (
    .clk (clk_brd),
    .addr(romaddr[PROG_AW-1:0]),
    .din (romdatao),
    .we  (romwr),
    .dout(romdatai)
  );

  lcd_int u_glue (
    .rst      (cpu_rst),
    .memaddr  (memaddr),
    .memdatao (memdatao),
    .memwr    (memwr),
    .memrd    (memrd),
    .memdatai (glue_rd),
    .rd_sel   (glue_rd_sel),
    .lcd_cs   (),
    .lcd_db_i (lcd_db_i),
    .lcd_db_o (lcd_db_o),
    .lcd_db_oe(lcd_db_oe),
    .lcd_e    (lcd_e),
    .lcd_rw   (lcd_rw),
    .lcd_rs   (lcd_rs)
  );

  always_comb begin
    memdatai  = glue_rd_sel ? glue_rd : '0;
    lcd_light = 1'b1;
  end

endmodule
