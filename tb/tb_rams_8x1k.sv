// tb_rams_8x1k: self-checking test of the 1K x 8 program RAM.
//
// Fills all 1024 words with a pseudo-random pattern, reads every word back
// checking the one-clock read latency (dout valid on the edge after the
// address is presented), checks that we=0 cycles do not write, and that a
// read of the address being written returns the old word.
module tb_rams_8x1k;

  logic       clk = 1'b0;
  logic [9:0] addr;
  logic [7:0] din, dout;
  logic       we;
  logic [7:0] ref_mem [1024];
  int unsigned checks = 0, failures = 0;

  rams_8x1k dut (.clk(clk), .addr(addr), .din(din), .we(we), .dout(dout));

  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: addr=%0d got %h exp %h", what, addr, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0; din = '0; we = 1'b0;
    // fill
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      addr = 10'(i); din = 8'((i * 37 + 11) ^ (i >> 3)); we = 1'b1;
      ref_mem[i] = din;
    end
    @(negedge clk); we = 1'b0;
    // read back, one-clock latency
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); addr = 10'(i);
      @(posedge clk); #1;
      chk("read", dout, ref_mem[i]);
    end
    // latency: the new address must not show before the edge
    @(negedge clk); addr = 10'd5; @(posedge clk); #1;
    @(negedge clk); addr = 10'd6; #1;
    chk("no combinational read", dout, ref_mem[5]);
    @(posedge clk); #1; chk("registered read", dout, ref_mem[6]);
    // we=0 writes nothing
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); addr = 10'($urandom); din = 8'($urandom); we = 1'b0;
      @(posedge clk); #1; chk("read with we=0", dout, ref_mem[addr]);
    end
    // read-before-write, then the new value
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); addr = 10'($urandom); din = 8'($urandom); we = 1'b1;
      @(posedge clk); #1; chk("read during write", dout, ref_mem[addr]);
      ref_mem[addr] = din;
      @(negedge clk); we = 1'b0;
      @(posedge clk); #1; chk("read after write", dout, ref_mem[addr]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
