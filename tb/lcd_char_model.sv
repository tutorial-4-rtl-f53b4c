// lcd_char_model: behavioural model (testbench only) of a 2-line character
// LCD module driven through RS, RW, E and an 8-bit data bus.
//
// Registers: instruction register (RS = 0) and data RAM (RS = 1). Writes
// take effect on the falling edge of E with RW = 0. Reading with RW = 1,
// RS = 0 returns {busy flag, address counter[6:0]} while E is high; RS = 1
// returns the data RAM byte at the address counter (advanced when E falls).
// The data RAM holds 80 positions, 40 per line: the first visible line is
// positions 0-15 and the second 40-55. Instructions modelled:
//   0x01 clear (all spaces, address 0), 0x04-0x07 entry mode,
//   0x08-0x0F display control, 0x20-0x3F function set, 0x80+a set address.
// Every write makes the module busy for BUSY_CYCLES clocks (CLEAR_CYCLES for
// clear). A write while busy is counted in 'overruns'; the interface
// driving the data bus while the module drives it (E high, RW = 1) is
// counted in 'clashes'.
module lcd_char_model #(
  parameter int unsigned BUSY_CYCLES  = 10,
  parameter int unsigned CLEAR_CYCLES = 30
) (
  input  logic       clk,
  input  logic       e,
  input  logic       rw,
  input  logic       rs,
  input  logic [7:0] db_from_if,   // data driven by the interface
  input  logic       db_if_oe,     // interface drives the data bus
  output logic [7:0] db_to_if      // data driven by the module (reads)
);

  logic [7:0]  ddram [80];
  logic [6:0]  ac;
  logic        inc;        // entry mode I/D
  logic [2:0]  disp_ctrl;  // display, cursor, blink
  logic [2:0]  func_set;   // DL, N, F
  logic [7:0]  last_instr;
  int unsigned cyc = 0;
  int unsigned busy_until = 0;
  int unsigned n_instr   = 0;
  int unsigned n_data    = 0;
  int unsigned n_bf_read = 0;   // busy-flag reads
  int unsigned n_bf_busy = 0;   // busy-flag reads that found it busy
  int unsigned overruns  = 0;
  int unsigned clashes   = 0;
  logic        busy;

  initial begin
    foreach (ddram[i]) ddram[i] = 8'h20;
    ac = '0; inc = 1'b1; disp_ctrl = '0; func_set = '0; last_instr = '0;
  end

  assign busy = (cyc < busy_until);

  always_comb begin
    if (rs) db_to_if = ddram[ac];
    else    db_to_if = {busy, ac};
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (e && rw && db_if_oe) clashes++;
  end

  function automatic logic [6:0] step(input logic [6:0] a, input logic up);
    if (up) return (a == 7'd79) ? 7'd0 : a + 7'd1;
    else    return (a == 7'd0) ? 7'd79 : a - 7'd1;
  endfunction

  always @(negedge e) begin
    if (rw) begin
      if (!rs) begin
        n_bf_read++;
        if (busy) n_bf_busy++;
      end else begin
        ac = step(ac, inc);
      end
    end else begin
      if (busy) overruns++;
      if (!rs) begin
        n_instr++;
        last_instr = db_from_if;
        busy_until = cyc + BUSY_CYCLES;
        if (db_from_if[7]) begin
          ac = (db_from_if[6:0] < 7'd80) ? db_from_if[6:0] : 7'd0;
        end else if (db_from_if[5]) begin
          func_set = db_from_if[4:2];
        end else if (db_from_if[3]) begin
          disp_ctrl = db_from_if[2:0];
        end else if (db_from_if[2]) begin
          inc = db_from_if[1];
        end else if (db_from_if[0]) begin
          foreach (ddram[i]) ddram[i] = 8'h20;
          ac = '0;
          inc = 1'b1;
          busy_until = cyc + CLEAR_CYCLES;
        end
      end else begin
        n_data++;
        ddram[ac] = db_from_if;
        ac = step(ac, inc);
        busy_until = cyc + BUSY_CYCLES;
      end
    end
  end

endmodule
