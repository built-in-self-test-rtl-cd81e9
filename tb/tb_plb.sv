// tb_plb: self-checking test of the programmable logic block.
// Random truth tables, output selections and patterns; LUT and output values
// are compared with a reference built from the truth-table bits, and the
// flip-flop is tracked through loads and BIST clock enables.
module tb_plb;
  import bist_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, ce = 1'b0, ff_load = 1'b0, ff_load_val = 1'b0;
  logic [7:0] lut_a = '0, lut_b = '0;
  cell_ctrl_t ctrl = '0;
  logic [TPG_W-1:0] in_pat = '0;
  logic x_out, y_out, a_out, b_out;
  int checks = 0, failures = 0;

  plb dut (.*);

  always #5 clk = ~clk;

  // asynchronous reset pulse from time 1 until the first negative clock edge
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic sel(logic [1:0] s, logic a, logic b, logic q);
    case (s)
      2'd0: return a;
      2'd1: return b;
      2'd2: return q;
      default: return ~q;
    endcase
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  logic ref_q;

  initial begin
    logic ea, eb;
    ref_q = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // flip-flop load
    @(negedge clk); ff_load = 1'b1; ff_load_val = 1'b1; ce = 1'b1;
    @(negedge clk); ff_load = 1'b0; ce = 1'b0; ref_q = 1'b1;
    ctrl.x_sel = OUT_FF; ctrl.y_sel = OUT_NFF; #1;
    check("load x", x_out, 1'b1);
    check("load y", y_out, 1'b0);
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      lut_a  = 8'($urandom);
      lut_b  = 8'($urandom);
      ctrl   = cell_ctrl_t'(8'($urandom));
      in_pat = TPG_W'($urandom);
      ce     = ($urandom % 2) == 1;
      #1;
      ea = (lut_a >> in_pat[2:0]) & 1'b1;
      eb = (lut_b >> in_pat[4:2]) & 1'b1;
      check("lut a", a_out, ea);
      check("lut b", b_out, eb);
      check("x", x_out, sel(ctrl.x_sel, ea, eb, ref_q));
      check("y", y_out, sel(ctrl.y_sel, ea, eb, ref_q));
      @(posedge clk);
      if (ce) ref_q = ctrl.d_sel ? eb : ea;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
