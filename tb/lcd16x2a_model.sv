// lcd16x2a_model: behavioural model (testbench only, not synthesizable
// intent) of a character-LCD controller with a one-character-per-write
// interface: DATA[7:0], ADDR[3:0] (column), LINE, STROBE and BUSY.
//
// On a rising clk edge with strobe high and busy low, the character is
// stored in the screen image at (line, addr) and busy is raised for
// BUSY_CYCLES clocks. After reset busy stays high for INIT_CYCLES clocks,
// standing for the display initialisation the controller performs at power
// up. A strobe seen while busy is counted in 'overruns' and ignored.
module lcd16x2a_model #(
  parameter int unsigned BUSY_CYCLES = 12,
  parameter int unsigned INIT_CYCLES = 40
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic [3:0] addr,
  input  logic       line,
  input  logic       strobe,
  output logic       busy
);

  logic [7:0]  screen [2][16];
  int unsigned busy_cnt;
  int unsigned n_chars  = 0;
  int unsigned n_line1  = 0;   // characters written to the second line
  int unsigned overruns = 0;
  logic        strobe_q;

  initial begin
    busy_cnt = 0;
    strobe_q = 1'b0;
    foreach (screen[l, c]) screen[l][c] = 8'h20;
  end

  assign busy = (busy_cnt != 0);

  always @(posedge clk) begin
    strobe_q <= strobe;
    if (rst) begin
      busy_cnt <= INIT_CYCLES;
      foreach (screen[l, c]) screen[l][c] <= 8'h20;
    end else if (strobe && !strobe_q) begin
      if (busy) begin
        overruns++;
      end else begin
        screen[line][addr] <= data;
        n_chars++;
        if (line) n_line1++;
        busy_cnt <= BUSY_CYCLES;
      end
    end else if (busy_cnt != 0) begin
      busy_cnt <= busy_cnt - 1;
    end
  end

endmodule
