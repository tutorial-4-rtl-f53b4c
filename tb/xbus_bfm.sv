// xbus_bfm: bus-cycle model of the CPU's external data (XDATA) bus, used by
// the testbenches in place of the CPU.
//
// All outputs change on rising clk edges. A write presents address and data
// for one cycle, raises memwr for one cycle, drops it and holds address and
// data one more cycle. A read presents the address for one cycle, raises
// memrd for one cycle and samples memdatai on the edge that drops it. The
// idle address is 0xFFFF. Cycle counts: xwrite and xread take 4 clocks each.
module xbus_bfm (
  input  logic        clk,
  output logic [15:0] memaddr,
  output logic [7:0]  memdatao,
  output logic        memwr,
  output logic        memrd,
  input  logic [7:0]  memdatai
);

  int unsigned n_writes = 0;
  int unsigned n_reads  = 0;

  initial begin
    memaddr  = 16'hFFFF;
    memdatao = 8'h00;
    memwr    = 1'b0;
    memrd    = 1'b0;
  end

  task automatic xwrite(input logic [15:0] a, input logic [7:0] d);
    @(posedge clk);
    memaddr  <= a;
    memdatao <= d;
    @(posedge clk);
    memwr <= 1'b1;
    @(posedge clk);
    memwr <= 1'b0;
    @(posedge clk);
    memaddr  <= 16'hFFFF;
    memdatao <= 8'h00;
    n_writes++;
  endtask

  task automatic xread(input logic [15:0] a, output logic [7:0] d);
    @(posedge clk);
    memaddr <= a;
    @(posedge clk);
    memrd <= 1'b1;
    @(posedge clk);
    d = memdatai;
    memrd <= 1'b0;
    @(posedge clk);
    memaddr <= 16'hFFFF;
    n_reads++;
  endtask

endmodule
