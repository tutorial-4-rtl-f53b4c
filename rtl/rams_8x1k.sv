// rams_8x1k: single-port synchronous RAM, 1K words of 8 bits, used as the
// CPU's program memory on its ROM bus.
//
// Writes: din is stored at addr on a rising clk edge while we is high.
// Reads:  dout shows the word at the address presented on the previous
//         rising edge (one clock of read latency). A read of the address
//         being written returns the old word (read-before-write).
//
// The size (8 x 1K) and the port names come from the system schematics;
// the read latency, write-enable polarity and read-before-write behaviour
// are this design's choices. The contents are not initialised: the CPU's
// debug port loads the program.
module rams_8x1k #(
  parameter int unsigned AW = 10,  // address bits: 1K words
  parameter int unsigned DW = 8    // word width
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  input  logic          we,
  output logic [DW-1:0] dout
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    dout <= mem[addr];
  end

endmodule
