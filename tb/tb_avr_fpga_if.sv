// tb_avr_fpga_if: self-checking test of the processor I/O interface.
// Exhaustive over strobes, select address and routing bits.
module tb_avr_fpga_if;
  import bist_pkg::*;
  logic iowe, iore, logic_shout, routing_shout;
  logic [3:0] io_addr;
  bist_ctrl_t bist_ctrl;
  logic [15:0] io_sel;
  logic bist_ce;
  logic [7:0] io_rdata;
  int checks = 0, failures = 0;

  avr_fpga_if dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 2048; v++) begin
      {iowe, iore, io_addr, bist_ctrl.clk_route, bist_ctrl.shout_route,
       bist_ctrl.shout_src, logic_shout, routing_shout} = 11'(v);
      bist_ctrl.rsvd = '0;
      #1;
      check("sel", io_sel, (iowe || iore) ? (1 << io_addr) : 0);
      check("bist clock", bist_ce, iowe && bist_ctrl.clk_route);
      check("read", io_rdata, (iore && bist_ctrl.shout_route) ?
            (bist_ctrl.shout_src ? routing_shout : logic_shout) : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
