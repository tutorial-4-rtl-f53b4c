// lcd_ctrl_system: the controller-based LCD system around an 8051-class CPU.
//
// The CPU and the character-LCD controller are external to this module; their
// pins are the ports here. Inside are:
//   * reset generation: a power-up pulse (fpga_startup8, delay all ones)
//     ORed with the inverted push-button input, so cpu_rst is high at power
//     up and while test_button is low. The same reset goes to the CPU and
//     to the LCD controller, and both run on clk_brd.
//   * program memory (rams_8x1k) on the CPU ROM bus, addressed by
//     romaddr[9:0]; romaddr[15:10] are unused.
//   * the glue logic (lcd_controller_int) on the external data bus. The
//     controller gets the CPU write data directly, memaddr[3:0] as the
//     column and memaddr[4] as LINE, so address 0x00-0x0F is line 0 and
//     0x10-0x1F line 1. Reads anywhere in 0x0000-0x001F return BUSY on
//     memdatai[0]; memdatai[7:1] are always 0.
//   * lcd_light is tied high (backlight always on).
// All of the above follows the tutorial's top-level schematic; the read
// multiplexer in place of a tri-state return is this design's choice.
module lcd_ctrl_system
  import lcd_io_pkg::*;
(
  input  logic               clk_brd,
  input  logic               test_button,     // active low push button
  output logic               cpu_rst,         // reset to CPU and LCD controller
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
  // LCD controller pins (controller clocked by clk_brd, reset by cpu_rst)
  output logic [XDATA_W-1:0] lcd_ctrl_data,
  output logic [3:0]         lcd_ctrl_addr,
  output logic               lcd_ctrl_line,
  output logic               lcd_ctrl_strobe,
  input  logic               lcd_ctrl_busy,
  output logic               lcd_light
);

  logic init;
  logic glue_rd, glue_rd_sel;

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

  lcd_controller_int u_glue (
    .memaddr (memaddr[XADDR_W-1:CTRL_ADDR_LSB]),
    .memwr   (memwr),
    .memrd   (memrd),
    .busy    (lcd_ctrl_busy),
    .strobe  (lcd_ctrl_strobe),
    .memdatai(glue_rd),
    .rd_sel  (glue_rd_sel),
    .lcd_cs  ()
  );

  always_comb begin
    memdatai      = glue_rd_sel ? {{(XDATA_W-1){1'b0}}, glue_rd} : '0;
    lcd_ctrl_data = memdatao;
    lcd_ctrl_addr = memaddr[3:0];
    lcd_ctrl_line = memaddr[4];
    lcd_light     = 1'b1;
  end

endmodule
