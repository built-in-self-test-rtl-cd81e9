// tb_logic_ora: self-checking test of the comparison ORA.
// Random X/Y inputs with a reference sticky flag; then shift mode, checking
// that switching to shift mode keeps the stored result.
module tb_logic_ora;
  logic clk = 1'b0, rst_n = 1'b1, ce = 1'b0, enable = 1'b1, shift = 1'b0;
  logic x_in = 1'b0, y_in = 1'b0, shift_in = 1'b0, load = 1'b0, load_val = 1'b0;
  logic fail;
  int checks = 0, failures = 0;

  logic_ora dut (.*);

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
    for (int run = 0; run < 50; run++) begin
      // initialise
      load = 1'b1; load_val = 1'b0; ce = 1'b1; x_in = 1'b1; y_in = 1'b0;
      @(negedge clk); load = 1'b0;
      check("init", fail, 1'b0);
      r = 1'b0;
      shift = 1'b0;
      for (int i = 0; i < 32; i++) begin
        x_in = $urandom % 2;
        // mostly matching values, a mismatch now and then
        y_in = (($urandom % 40) == 0) ? ~x_in : x_in;
        ce = ($urandom % 4) != 0;
        enable = ($urandom % 8) != 0;
        @(negedge clk);
        if (ce && enable) r = r | (x_in ^ y_in);
        check("compare", fail, r);
      end
      // switch to shift mode: content unchanged until a BIST clock
      shift = 1'b1; ce = 1'b0; enable = 1'b1;
      @(negedge clk);
      check("mode switch keeps result", fail, r);
      for (int i = 0; i < 4; i++) begin
        shift_in = $urandom % 2;
        ce = 1'b1;
        @(negedge clk);
        check("shift", fail, shift_in);
      end
      shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
