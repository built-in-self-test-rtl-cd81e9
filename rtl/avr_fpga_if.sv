// avr_fpga_if: processor side of the core's 8-bit I/O interface.
//
// The processor reaches the core through an 8-bit data bus. A write raises the
// write strobe `iowe` and a read the read strobe `iore`, each together with
// one of 16 decoded select lines (`io_sel`, decoded here from the 4-bit
// `io_addr` and active only while a strobe is high). For BIST the write strobe
// is also routed to the core's global clock: while `clk_route` is set, every
// cycle with `iowe` high is one BIST clock (`bist_ce`), so the processor
// clocks the TPGs, BUTs and ORAs by writing. While `shout_route` is set, a
// read returns the output of the last ORA of the selected shift chain in bit
// 0 of `io_rdata` (`shout_src`: 0 logic BIST, 1 routing BIST); otherwise the
// read data are 0.
//
// Timing: strobes are one cycle of `clk` wide and synchronous to it; the BIST
// clock is modelled as a clock enable on `clk` rather than as a separate clock
// net. `io_sel` and `io_rdata` are combinational. The strobes, the 16 selects,
// the strobe-as-BIST-clock and the routing of the shift-register output to
// the processor follow the described interface and BIST steps; the
// clock-enable form and the read data layout are this design's choices.
module avr_fpga_if
  import bist_pkg::*;
(
  input  logic        iowe,
  input  logic        iore,
  input  logic [3:0]  io_addr,
  input  bist_ctrl_t  bist_ctrl,
  input  logic        logic_shout,
  input  logic        routing_shout,
  output logic [15:0] io_sel,
  output logic        bist_ce,
  output logic [7:0]  io_rdata
);

  always_comb begin
    io_sel  = (iowe || iore) ? (16'd1 << io_addr) : 16'd0;
    bist_ce = iowe && bist_ctrl.clk_route;
    io_rdata = 8'd0;
    if (iore && bist_ctrl.shout_route)
      io_rdata[0] = bist_ctrl.shout_src ? routing_shout : logic_shout;
  end

endmodule
