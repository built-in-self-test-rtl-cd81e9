// tb_routing_tpg: self-checking test of the parity routing TPG.
// Even mode must count 00,01,10,11 with even parity, odd mode 11,10,01,00 with
// odd parity; the wire mapping is C1,C0,Par,C1,C0 from wire 0 to wire 4. Over
// both sequences every pair of distinct signals must show both 0-1 and 1-0.
module tb_routing_tpg;
  logic clk = 1'b0, rst_n = 1'b1, ce = 1'b0, load = 1'b0, odd = 1'b0;
  logic [1:0] count;
  logic parity;
  logic [4:0] wires;
  int checks = 0, failures = 0;

  routing_tpg dut (.*);

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

  logic [2:0] seen [$];   // {C1, C0, Par}

  initial begin
    @(negedge clk); rst_n = 1'b1;
    for (int m = 0; m < 2; m++) begin
      load = 1'b1; odd = m[0];
      @(negedge clk); load = 1'b0;
      for (int i = 0; i < 8; i++) begin
        int c;
        logic c1, c0, p;
        c  = m ? (3 - (i % 4)) : (i % 4);
        c1 = c[1]; c0 = c[0];
        p  = c1 ^ c0 ^ m[0];
        check("count", count, c);
        check("parity", parity, p);
        check("wires", wires, {c0, c1, p, c0, c1});
        if (i < 4) seen.push_back({c1, c0, p});
        ce = 1'b1;
        @(negedge clk);
        ce = 1'b0;
      end
      // hold
      @(negedge clk);
      check("hold", count, m ? 3 : 0);
    end
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) if (a != b) begin
        int n01 = 0, n10 = 0;
        foreach (seen[k]) begin
          if (!seen[k][a] && seen[k][b]) n01++;
          if (seen[k][a] && !seen[k][b]) n10++;
        end
        check("pair has 0-1", int'(n01 > 0), 1);
        check("pair has 1-0", int'(n10 > 0), 1);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
