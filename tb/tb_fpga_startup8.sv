// tb_fpga_startup8: self-checking test of the power-up reset pulse.
//
// Four instances with delays 0, 1, 7 and 255 (255 is the value used in the
// systems, DELAY tied to all ones). For each, init must be high from time
// zero for exactly 'delay' rising clock edges, then stay low for a further
// 600 cycles.
module tb_fpga_startup8;

  logic clk = 1'b0;
  localparam int N = 4;
  localparam logic [7:0] DELAYS [N] = '{8'd0, 8'd1, 8'd7, 8'd255};
  logic [N-1:0] init;
  int unsigned checks = 0, failures = 0;

  for (genvar g = 0; g < N; g++) begin : g_dut
    fpga_startup8 dut (.clk(clk), .delay(DELAYS[g]), .init(init[g]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // cycle k: value seen after k rising edges
    for (int k = 0; k < 900; k++) begin
      #1;
      for (int g = 0; g < N; g++) begin
        logic exp;
        exp = (k < int'(DELAYS[g]));
        checks++;
        if (init[g] !== exp) begin
          failures++;
          $display("FAIL delay=%0d after %0d edges: init=%b exp %b",
                   DELAYS[g], k, init[g], exp);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
