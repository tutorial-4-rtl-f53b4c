// lcd_int: direct interface between the CPU external data bus and a
// character-LCD module (RS, RW, E and an 8-bit bidirectional data bus).
//
// The LCD needs RS and RW set up before E rises, which the CPU's own
// strobes cannot guarantee, so RS and RW come from a latch that software
// writes first. Two bus addresses are used:
//   0x0000  access the LCD: a write drives the data onto LCD_DB, a read
//           returns LCD_DB; either pulses lcd_e for as long as the CPU
//           strobe (MEMWR or MEMRD) is high.
//   0x0001  write the latch: data bit 1 -> RW, data bit 0 -> RS.
//
// Timing: the latch loads on the falling edge of memwr while 0x0001 is
// addressed, so the data must still be valid when the strobe ends. All
// other outputs are combinational from the bus.
//
// Bus-clash protection: the interface drives LCD_DB (lcd_db_oe) only while
// 0x0000 is selected and the latched RW is 0 (LCD in write mode); it
// returns LCD_DB to the CPU only on a read of 0x0000 with RW = 1. The
// data bus is split into lcd_db_o / lcd_db_oe / lcd_db_i for an external
// I/O buffer, and the CPU read data comes with a select (rd_sel) for a read
// multiplexer instead of a tri-state return.
//
// Decode, latch edge and bits, enable and clash rules follow the tutorial.
// The split data bus, the read select and the asynchronous reset of the
// latch (RS = RW = 0, so that the power-up state is defined) are this
// design's choices. An assertion checks that MEMWR and MEMRD are never high
// together.
module lcd_int
  import lcd_io_pkg::*;
(
  input  logic               rst,        // asynchronous reset of the RS/RW latch
  input  logic [XADDR_W-1:0] memaddr,
  input  logic [XDATA_W-1:0] memdatao,   // CPU write data
  input  logic               memwr,      // CPU write strobe, active high
  input  logic               memrd,      // CPU read strobe, active high
  output logic [XDATA_W-1:0] memdatai,   // CPU read data (0 when not selected)
  output logic               rd_sel,     // this device drives read data
  output logic               lcd_cs,     // 0x0000-0x0001 selected
  input  logic [XDATA_W-1:0] lcd_db_i,   // LCD data bus, from the pads
  output logic [XDATA_W-1:0] lcd_db_o,   // LCD data bus, to the pads
  output logic               lcd_db_oe,  // drive LCD data bus
  output logic               lcd_e,
  output logic               lcd_rw,
  output logic               lcd_rs
);

  logic sel_lcd, sel_latch;

  always_comb begin
    lcd_cs    = (memaddr[XADDR_W-1:1] == DIRECT_BASE[XADDR_W-1:1]);
    sel_lcd   = lcd_cs & ~memaddr[0];
    sel_latch = lcd_cs &  memaddr[0];
  end

  // RS/RW latch, loaded when a write strobe to 0x0001 ends.
  always_ff @(negedge memwr or posedge rst) begin
    if (rst) begin
      lcd_rw <= 1'b0;
      lcd_rs <= 1'b0;
    end else if (sel_latch) begin
      lcd_rw <= memdatao[LATCH_RW_BIT];
      lcd_rs <= memdatao[LATCH_RS_BIT];
    end
  end

  always_comb begin
    lcd_db_o  = memdatao;
    lcd_db_oe = sel_lcd & ~lcd_rw;
    rd_sel    = sel_lcd & memrd & lcd_rw;
    memdatai  = rd_sel ? lcd_db_i : '0;
    lcd_e     = sel_lcd & (memrd | memwr);
  end

  // Bus rule: the CPU never reads and writes in the same cycle. A read and
  // a write together would pulse E with the data bus in an unknown state.
  always_comb begin
    assert (!(memwr && memrd))
      else $error("lcd_int: MEMWR and MEMRD asserted together");
  end

endmodule
