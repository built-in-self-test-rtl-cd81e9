// tb_logic_tpg: self-checking test of the 5-bit logic BIST counter.
// Checks reset, load, one step per enabled clock, hold without enable, and
// that 32 BIST clocks return it to its start (all 32 patterns applied once).
module tb_logic_tpg;
  logic clk = 1'b0, rst_n = 1'b1, ce = 1'b0, load = 1'b0;
  logic [4:0] load_val = '0, pattern;
  int checks = 0, failures = 0;

  logic_tpg dut (.*);

  always #5 clk = ~clk;

  // asynchronous reset pulse from time 1 until the first negative clock edge
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int ref_v;
    bit seen [32];
    #2 check("reset", pattern, 0);
    @(negedge clk); rst_n = 1'b1;
    @(negedge clk); load = 1'b1; load_val = 5'd7; ce = 1'b1;
    @(negedge clk); load = 1'b0; ce = 1'b0;
    check("load", pattern, 7);
    ref_v = 7;
    foreach (seen[i]) seen[i] = 1'b0;
    for (int i = 0; i < 32; i++) begin
      seen[pattern] = 1'b1;
      ce = 1'b1;
      @(negedge clk);
      ref_v = (ref_v + 1) % 32;
      check("step", pattern, ref_v);
    end
    check("wrap after 32", pattern, 7);
    foreach (seen[i]) check("pattern applied", int'(seen[i]), 1);
    ce = 1'b0;
    repeat (3) @(negedge clk);
    check("hold", pattern, 7);
    for (int i = 0; i < 200; i++) begin
      ce = ($urandom % 2) == 1;
      @(negedge clk);
      if (ce) ref_v = (ref_v + 1) % 32;
      check("random", pattern, ref_v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
