// fpga_startup8: power-up reset pulse generator.
//
// After the FPGA is configured, init is held high for 'delay' rising edges
// of clk and then goes low for good. The counter starts from its
// configuration value (zero), so no reset input is needed; a delay of 0
// gives no pulse at all. In the systems 'delay' is tied to all ones, giving
// a 255-cycle reset, and init is combined with the (active-low) push button
// to form the CPU reset.
//
// Only the block's name and pins (CLK, DELAY[7..0], INIT) come from the
// system schematics; the counting behaviour is this design's reading of
// what a start-up block with those pins does. The power-up value is given
// by a declaration initialiser, as an FPGA configuration loads it; lint
// tools flag an initialised variable that a process also assigns
// (PROCASSINIT), and that warning stands for this reason.
module fpga_startup8 (
  input  logic       clk,
  input  logic [7:0] delay,  // number of cycles init stays high
  output logic       init    // high from configuration until 'delay' edges
);

  // Configuration-time value: the count starts at zero on power-up.
  logic [7:0] count = 8'd0;

  always_ff @(posedge clk) begin
    if (count != delay) count <= count + 8'd1;
  end

  assign init = (count != delay);

endmodule
