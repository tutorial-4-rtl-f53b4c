// lcd_controller_int: glue logic between the CPU external data bus and a
// character-LCD controller that takes one character per write.
//
// The controller covers 32 bus addresses, one per screen character
// (16 columns x 2 lines). Address bits [4:0] go straight to the controller
// (bits [3:0] as the column, bit 4 as LINE); this block only decodes the
// upper bits [15:5] against zero, so the controller sits at 0x0000-0x001F.
//
//   strobe  = memwr while the range is selected. The controller samples it
//             on its own clock, so the CPU's write strobe must span at
//             least one rising edge of that clock.
//   memdatai, rd_sel
//           = on a read anywhere in the range the controller's BUSY flag is
//             returned on data bit 0 and rd_sel is raised. Outside a read
//             memdatai is 0 and rd_sel is low, so an upstream read
//             multiplexer can select this device with rd_sel instead of
//             a tri-state bus.
//
// Purely combinational: no clock, no state, outputs follow inputs.
// Address decode, strobe gating and returning BUSY at every address of the
// range follow the tutorial. Replacing the tri-state read return with a
// select signal for a multiplexer is this design's choice (the tutorial
// recommends a multiplexer for on-chip designs).
module lcd_controller_int
  import lcd_io_pkg::*;
(
  input  logic [XADDR_W-1:CTRL_ADDR_LSB] memaddr,   // upper address bits
  input  logic                           memwr,     // CPU write strobe, active high
  input  logic                           memrd,     // CPU read strobe, active high
  input  logic                           busy,      // controller BUSY flag
  output logic                           strobe,    // write strobe to the controller
  output logic                           memdatai,  // read data bit 0 (BUSY)
  output logic                           rd_sel,    // this device drives read data
  output logic                           lcd_cs     // range 0x0000-0x001F selected
);

  always_comb begin
    lcd_cs   = (memaddr == CTRL_BASE[XADDR_W-1:CTRL_ADDR_LSB]);
    strobe   = lcd_cs & memwr;
    rd_sel   = lcd_cs & memrd;
    memdatai = rd_sel & busy;
  end

endmodule
