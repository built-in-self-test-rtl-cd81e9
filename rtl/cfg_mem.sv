// cfg_mem: configuration memory of the configurable core.
//
// The processor writes it one byte per cycle (`we`) at a 24-bit address split
// into X (column), Y (row) and Z (resource within the place); there is no read
// port towards the processor, so the memory is write-only as seen from it.
// Every stored bit drives the fabric in parallel. Writes can happen at any
// time, which is what allows dynamic partial reconfiguration: rewriting one
// byte changes only the resource it controls and leaves every flip-flop of the
// fabric untouched.
//
// Address map (this design's own; only the X/Y/Z split, the byte width and the
// write-only access follow the target device):
//   X < N, Y < N : Z=0 LUT A, Z=1 LUT B, Z=2 cell control byte,
//                  Z=3 (no storage) pulse `ff_load` of that cell with data[0]
//   X = 8'hFF    : Z=0 BIST control, Z=1 (no storage) load both logic TPGs
//                  with data[4:0], Z=2 routing TPG mode data[0] and re-initialise,
//                  Z=3 routing ORA control, Z=4 (no storage) load every routing
//                  ORA with data[0]
//   X = 8'hFE    : Y = row, Z = repeater boundary b (between segment b and b+1),
//                  data[4:0] = enable of the repeater on each of the five x4 wires
// Writes to any other address are ignored. Reset clears everything (all cells
// inactive, all repeaters off). The load pulses are registered: they reach
// the fabric one cycle after the write.
module cfg_mem
  import bist_pkg::*;
#(
  parameter int unsigned N = N_MAX,
  localparam int unsigned NSEG = N / SEG_LEN,
  localparam int unsigned NREP = (NSEG > 1) ? NSEG - 1 : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [7:0]       addr_x,
  input  logic [7:0]       addr_y,
  input  logic [7:0]       addr_z,
  input  logic [7:0]       wdata,
  // per-cell configuration, indexed [row][column]
  output logic [N-1:0][N-1:0][7:0] lut_a,
  output logic [N-1:0][N-1:0][7:0] lut_b,
  output cell_ctrl_t [N-1:0][N-1:0] ctrl,
  output logic [N-1:0][N-1:0]      ff_load,
  output logic             ff_load_val,
  // global registers
  output bist_ctrl_t       bist_ctrl,
  output rora_ctrl_t       rora_ctrl,
  output logic             tpg_load,
  output logic [TPG_W-1:0] tpg_load_val,
  output logic             rtpg_load,
  output logic             rtpg_odd,
  output logic             rora_load,
  output logic             rora_load_val,
  // repeater enables, indexed [row][boundary]
  output logic [N-1:0][NREP-1:0][BUS_W-1:0] rep_en
);

  logic in_array, is_global, is_rep;
  assign in_array  = (int'(addr_x) < N) && (int'(addr_y) < N);
  assign is_global = (addr_x == X_GLOBAL);
  assign is_rep    = (addr_x == X_REPEATER) && (int'(addr_y) < N) && (int'(addr_z) < NREP);

  // One register set per cell, each with its own decoded write enable.
  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      logic       hit;
      logic [7:0] a_q, b_q;
      cell_ctrl_t c_q;
      logic       l_q;
      assign hit = we && in_array && (int'(addr_y) == r) && (int'(addr_x) == c);
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          a_q <= '0;
          b_q <= '0;
          c_q <= '0;
          l_q <= 1'b0;
        end else begin
          if (hit && addr_z == Z_LUT_A) a_q <= wdata;
          if (hit && addr_z == Z_LUT_B) b_q <= wdata;
          if (hit && addr_z == Z_CTRL)  c_q <= cell_ctrl_t'(wdata);
          l_q <= hit && (addr_z == Z_FFINIT);
        end
      end
      assign lut_a[r][c]   = a_q;
      assign lut_b[r][c]   = b_q;
      assign ctrl[r][c]    = c_q;
      assign ff_load[r][c] = l_q;
    end
    for (genvar b = 0; b < NREP; b++) begin : g_rep
      logic [BUS_W-1:0] e_q;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)
          e_q <= '0;
        else if (we && is_rep && int'(addr_y) == r && int'(addr_z) == b)
          e_q <= wdata[BUS_W-1:0];
      end
      assign rep_en[r][b] = e_q;
    end
  end

  // Global registers and load strobes.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff_load_val   <= 1'b0;
      bist_ctrl     <= '0;
      rora_ctrl     <= '0;
      tpg_load      <= 1'b0;
      tpg_load_val  <= '0;
      rtpg_load     <= 1'b0;
      rtpg_odd      <= 1'b0;
      rora_load     <= 1'b0;
      rora_load_val <= 1'b0;
    end else begin
      tpg_load  <= we && is_global && (addr_z == Z_TPG_INIT);
      rtpg_load <= we && is_global && (addr_z == Z_RTPG);
      rora_load <= we && is_global && (addr_z == Z_RORA_INIT);
      if (we && in_array && addr_z == Z_FFINIT)     ff_load_val   <= wdata[0];
      if (we && is_global) begin
        if (addr_z == Z_BIST_CTRL) bist_ctrl     <= bist_ctrl_t'(wdata);
        if (addr_z == Z_TPG_INIT)  tpg_load_val  <= wdata[TPG_W-1:0];
        if (addr_z == Z_RTPG)      rtpg_odd      <= wdata[0];
        if (addr_z == Z_RORA)      rora_ctrl     <= rora_ctrl_t'(wdata);
        if (addr_z == Z_RORA_INIT) rora_load_val <= wdata[0];
      end
    end
  end

endmodule
