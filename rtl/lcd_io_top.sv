// lcd_io_top: the two LCD interface systems side by side.
//
//   ctl_*  controller-based system (lcd_ctrl_system): the CPU writes one
//          character per bus write at 0x0000-0x001F and polls a BUSY flag;
//          an external LCD controller does the display protocol.
//   dir_*  direct system (lcd_direct_system): the CPU drives the LCD module
//          itself through an RS/RW latch at 0x0001 and the LCD at 0x0000,
//          including initialisation and busy-flag polling.
//
// The two systems share nothing; each has its own clock, push button, CPU
// buses and LCD pins. The CPUs, the LCD controller and the LCD modules are
// outside this module. Showing the two alternatives together in one top is
// this design's arrangement; each system matches its own schematic.
module lcd_io_top
  import lcd_io_pkg::*;
(
  // ---- controller-based system ----
  input  logic               ctl_clk_brd,
  input  logic               ctl_test_button,
  output logic               ctl_cpu_rst,
  input  logic [XADDR_W-1:0] ctl_romaddr,
  input  logic [PROG_DW-1:0] ctl_romdatao,
  input  logic               ctl_romwr,
  output logic [PROG_DW-1:0] ctl_romdatai,
  input  logic [XADDR_W-1:0] ctl_memaddr,
  input  logic [XDATA_W-1:0] ctl_memdatao,
  input  logic               ctl_memwr,
  input  logic               ctl_memrd,
  output logic [XDATA_W-1:0] ctl_memdatai,
  output logic [XDATA_W-1:0] ctl_lcd_ctrl_data,
  output logic [3:0]         ctl_lcd_ctrl_addr,
  output logic               ctl_lcd_ctrl_line,
  output logic               ctl_lcd_ctrl_strobe,
  input  logic               ctl_lcd_ctrl_busy,
  output logic               ctl_lcd_light,
  // ---- direct system ----
  input  logic               dir_clk_brd,
  input  logic               dir_test_button,
  output logic               dir_cpu_rst,
  input  logic [XADDR_W-1:0] dir_romaddr,
  input  logic [PROG_DW-1:0] dir_romdatao,
  input  logic               dir_romwr,
  output logic [PROG_DW-1:0] dir_romdatai,
  input  logic [XADDR_W-1:0] dir_memaddr,
  input  logic [XDATA_W-1:0] dir_memdatao,
  input  logic               dir_memwr,
  input  logic               dir_memrd,
  output logic [XDATA_W-1:0] dir_memdatai,
  input  logic [XDATA_W-1:0] dir_lcd_db_i,
  output logic [XDATA_W-1:0] dir_lcd_db_o,
  output logic               dir_lcd_db_oe,
  output logic               dir_lcd_e,
  output logic               dir_lcd_rw,
  output logic               dir_lcd_rs,
  output logic               dir_lcd_light
);

  lcd_ctrl_system u_ctl (
    .clk_brd        (ctl_clk_brd),
    .test_button    (ctl_test_button),
    .cpu_rst        (ctl_cpu_rst),
    .romaddr        (ctl_romaddr),
    .romdatao       (ctl_romdatao),
    .romwr          (ctl_romwr),
    .romdatai       (ctl_romdatai),
    .memaddr        (ctl_memaddr),
    .memdatao       (ctl_memdatao),
    .memwr          (ctl_memwr),
    .memrd          (ctl_memrd),
    .memdatai       (ctl_memdatai),
    .lcd_ctrl_data  (ctl_lcd_ctrl_data),
    .lcd_ctrl_addr  (ctl_lcd_ctrl_addr),
    .lcd_ctrl_line  (ctl_lcd_ctrl_line),
    .lcd_ctrl_strobe(ctl_lcd_ctrl_strobe),
    .lcd_ctrl_busy  (ctl_lcd_ctrl_busy),
    .lcd_light      (ctl_lcd_light)
  );

  lcd_direct_system u_dir (
    .clk_brd    (dir_clk_brd),
    .test_button(dir_test_button),
    .cpu_rst    (dir_cpu_rst),
    .romaddr    (dir_romaddr),
    .romdatao   (dir_romdatao),
    .romwr      (dir_romwr),
    .romdatai   (dir_romdatai),
    .memaddr    (dir_memaddr),
    .memdatao   (dir_memdatao),
    .memwr      (dir_memwr),
    .memrd      (dir_memrd),
    .memdatai   (dir_memdatai),
    .lcd_db_i   (dir_lcd_db_i),
    .lcd_db_o   (dir_lcd_db_o),
    .lcd_db_oe  (dir_lcd_db_oe),
    .lcd_e      (dir_lcd_e),
    .lcd_rw     (dir_lcd_rw),
    .lcd_rs     (dir_lcd_rs),
    .lcd_light  (dir_lcd_light)
  );

endmodule
