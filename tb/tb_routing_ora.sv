// tb_routing_ora: self-checking test of the parity ORA.
// Random three-wire values in even and odd mode against a reference sticky
// parity flag, then shift mode and initialisation.
module tb_routing_ora;
  logic clk = 1'b0, rst_n = 1'b1, ce = 1'b0, odd = 1'b0, shift = 1'b0;
  logic c0 = 1'b0, c1 = 1'b0, par = 1'b0, shift_in = 1'b0, load = 1'b0, load_val = 1'b0;
  logic fail;
  int checks = 0, failures = 0;

  routing_ora dut (.*);

  always #5 clk = ~clk;

  // asynchronous reset pulse from time 1 until the first negative clock edge
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    logic r;
    @(negedge clk); rst_n = 1'b1;
    for (int run = 0; run < 60; run++) begin
      odd = run[0];
      load = 1'b1; load_val = 1'b0; ce = 1'b1;
      @(negedge clk); load = 1'b0;
      check("init", fail, 1'b0);
      r = 1'b0;
      for (int i = 0; i < 16; i++) begin
        c0 = $urandom % 2; c1 = $urandom % 2;
        par = c0 ^ c1 ^ odd;
        if (($urandom % 20) == 0) par = ~par;
        ce = ($urandom % 3) != 0;
        @(negedge clk);
        if (ce && ((c0 ^ c1 ^ par) != odd)) r = 1'b1;
        check("parity", fail, r);
      end
      shift = 1'b1;
      for (int i = 0; i < 3; i++) begin
        shift_in = $urandom % 2; ce = 1'b1;
        @(negedge clk);
        check("shift", fail, shift_in);
      end
      shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
