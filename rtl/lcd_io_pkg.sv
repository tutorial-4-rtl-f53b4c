// lcd_io_pkg: constants shared by the two LCD interface systems.
//
// Both systems hang the LCD on the external data (XDATA) bus of an
// 8051-class CPU: a 16-bit address, 8-bit data, and active-high MEMWR and
// MEMRD strobes. The controller-based interface occupies 0x0000-0x001F (one
// address per screen character, 16 characters by two lines); the direct
// interface uses 0x0000 for the LCD itself and 0x0001 for the RS/RW latch.
// These address maps follow the tutorial's specification.
package lcd_io_pkg;

  localparam int unsigned XADDR_W = 16;  // external data address width
  localparam int unsigned XDATA_W = 8;   // external data width

  // Controller-based interface: 16 characters x 2 lines = 32 addresses.
  localparam int unsigned CTRL_ADDR_LSB = 5;  // address bits [15:5] are decoded
  localparam logic [XADDR_W-1:0] CTRL_BASE = 16'h0000;

  // Direct interface: two addresses.
  localparam logic [XADDR_W-1:0] DIRECT_BASE = 16'h0000;  // 0x0000 LCD, 0x0001 latch

  // Bit positions in the byte written to the RS/RW latch (address 0x0001).
  localparam int unsigned LATCH_RS_BIT = 0;
  localparam int unsigned LATCH_RW_BIT = 1;

  // Program memory of the CPU (RAMS_8x1K).
  localparam int unsigned PROG_AW = 10;
  localparam int unsigned PROG_DW = 8;

  // Power-up delay applied to the start-up block: its DELAY input is tied
  // to VCC in the schematics, i.e. all ones.
  localparam logic [7:0] STARTUP_DELAY = 8'hFF;

endpackage
