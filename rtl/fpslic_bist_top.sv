// fpslic_bist_top: configurable core prepared for processor-driven BIST.
//
// The embedded processor (outside this module) tests the core without any
// external configuration download: it writes BIST configurations into the
// configuration memory through the X/Y/Z/D port, clocks the BIST through the
// I/O write strobe, and shifts the ORA results back through the I/O read
// port. Inside are
//   * cfg_mem            - write-only configuration memory (24-bit address, 8-bit data)
//   * logic_bist_array   - N x N PLBs usable as BUTs or ORAs, with two 5-bit TPGs
//   * routing_bist_array - x4 wire buses with repeaters, a parity TPG and parity ORAs
//   * avr_fpga_if        - strobes, 16 select lines, BIST clock, result read-back
// A typical logic BIST session: clear the array, configure the ORA columns and
// initialise their flip-flops, configure the BUT columns, load the TPGs, set
// clk_route, issue 32 write strobes (one per pattern), set ora_shift on every
// ORA, set shout_route, then alternately read bit 0 and write a strobe once per
// ORA. Only the BUT bytes need rewriting between configurations of a session;
// ORA results survive reconfiguration.
//
// All state is clocked by `clk` and reset asynchronously by `rst_n` (active
// low). Configuration writes take effect on the next edge; the BIST clock is
// `iowe` while clk_route is set. The processor's write data bus carries no
// information for the BIST (only the write strobe is used), so it is not a
// port here.
module fpslic_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned N = N_MAX
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration memory write port
  input  logic        cfg_we,
  input  logic [7:0]  fpgax,
  input  logic [7:0]  fpgay,
  input  logic [7:0]  fpgaz,
  input  logic [7:0]  fpgad,
  // I/O interface
  input  logic        iowe,
  input  logic        iore,
  input  logic [3:0]  io_addr,
  output logic [15:0] io_sel,
  output logic [7:0]  io_rdata
);

  localparam int unsigned NSEG = N / SEG_LEN;
  localparam int unsigned NREP = (NSEG > 1) ? NSEG - 1 : 1;
  localparam int unsigned NRORA = N * NSEG * 2;

  logic [N-1:0][N-1:0][7:0] lut_a, lut_b;
  cell_ctrl_t [N-1:0][N-1:0] ctrl;
  logic [N-1:0][N-1:0]      ff_load;
  logic             ff_load_val;
  bist_ctrl_t       bist_ctrl;
  rora_ctrl_t       rora_ctrl;
  logic             tpg_load, rtpg_load, rtpg_odd, rora_load, rora_load_val;
  logic [TPG_W-1:0] tpg_load_val;
  logic [N-1:0][NREP-1:0][BUS_W-1:0] rep_en;
  logic             bist_ce, logic_shout, routing_shout;

  logic [1:0][TPG_W-1:0] tpg_pat_unused;
  logic [N-1:0][N-1:0]   lfail_unused;
  logic [NRORA-1:0]      rfail_unused;
  logic [BUS_W-1:0] rwires_unused;

  cfg_mem #(.N(N)) u_cfg (
    .clk, .rst_n,
    .we (cfg_we), .addr_x (fpgax), .addr_y (fpgay), .addr_z (fpgaz), .wdata (fpgad),
    .lut_a, .lut_b, .ctrl, .ff_load, .ff_load_val,
    .bist_ctrl, .rora_ctrl, .tpg_load, .tpg_load_val,
    .rtpg_load, .rtpg_odd, .rora_load, .rora_load_val, .rep_en
  );

  avr_fpga_if u_if (
    .iowe, .iore, .io_addr, .bist_ctrl,
    .logic_shout, .routing_shout,
    .io_sel, .bist_ce, .io_rdata
  );

  logic_bist_array #(.N(N)) u_logic (
    .clk, .rst_n, .ce (bist_ce),
    .lut_a, .lut_b, .ctrl, .ff_load, .ff_load_val,
    .tpg_load, .tpg_load_val,
    .tpg_pat   (tpg_pat_unused),
    .fail      (lfail_unused),
    .shift_out (logic_shout)
  );

  routing_bist_array #(.N(N)) u_routing (
    .clk, .rst_n, .ce (bist_ce),
    .rtpg_load, .rtpg_odd, .rora_ctrl,
    .ora_load     (rora_load),
    .ora_load_val (rora_load_val),
    .rep_en,
    .tpg_wires    (rwires_unused),
    .fail         (rfail_unused),
    .shift_out    (routing_shout)
  );

endmodule
