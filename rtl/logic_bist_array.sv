// logic_bist_array: the PLB array arranged for logic BIST.
//
// Every place of the N x N array holds a PLB and an output response analyser
// (ORA); the cell's control byte decides whether it acts as a block under test
// (BUT), as an ORA, or stays idle (inactive or part of the TPG column). Two
// identical 5-bit counter TPGs drive identical patterns: TPG 0 feeds rows
// 0 .. N/2-1 and TPG 1 feeds rows N/2 .. N-1, the two halves the figures call
// routing scheme 1 and 2. The ORA at row r, column c compares the orthogonal Y
// output of the cell west of it, (r, c-1), with the diagonal X output of the
// cell east of it in the paired row, (r^1, c+1). With a TPG column at one edge
// and BUT and ORA columns alternating after it, every ORA thus watches two
// identically configured BUTs fed by the same pattern; placing the TPG column
// at the other edge (the flipped session) turns the previous TPG and ORA
// columns into BUTs.
//
// All ORAs form one shift chain in row-major order (row 0 column 0 first);
// cells that are not ORAs are bypassed. In shift mode each BIST clock moves
// every ORA result one ORA further along and `shift_out` shows the last ORA of
// the chain, so the processor reads the results last ORA first.
//
// Timing: the TPGs, PLB flip-flops and ORAs all advance on the same rising
// clock edge where `ce` (the BIST clock) is high; an ORA samples the BUT
// outputs of the pattern present before that edge.
//
// What follows the described BIST: TPG column, alternating BUT and ORA
// columns, X/Y comparison, flipping, shift-register read-out. This design's
// own: the row split between the TPGs, the row pairing r^1, the chain order.
module logic_bist_array
  import bist_pkg::*;
#(
  parameter int unsigned N = N_MAX
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,           // BIST clock enable
  input  logic [N-1:0][N-1:0][7:0] lut_a,
  input  logic [N-1:0][N-1:0][7:0] lut_b,
  input  cell_ctrl_t [N-1:0][N-1:0] ctrl,
  input  logic [N-1:0][N-1:0]      ff_load,
  input  logic             ff_load_val,
  input  logic             tpg_load,
  input  logic [TPG_W-1:0] tpg_load_val,
  output logic [1:0][TPG_W-1:0] tpg_pat,
  output logic [N-1:0][N-1:0]      fail,   // ORA flags (meaningful where role is ORA)
  output logic             shift_out
);

  logic [N-1:0][N-1:0] x_o, y_o;
  logic [N*N-1:0]      chain;        // chain value after cell k (last ORA at or before k)

  for (genvar t = 0; t < 2; t++) begin : g_tpg
    logic_tpg u_tpg (
      .clk, .rst_n, .ce,
      .load     (tpg_load),
      .load_val (tpg_load_val),
      .pattern  (tpg_pat[t])
    );
  end

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      localparam int unsigned K  = r * N + c;
      localparam int unsigned PR = r ^ 1;
      logic is_but, is_ora, x_nb, y_nb, sh_in;
      logic a_unused, b_unused;

      assign is_but = (ctrl[r][c].role == ROLE_BUT);
      assign is_ora = (ctrl[r][c].role == ROLE_ORA);

      plb u_plb (
        .clk, .rst_n,
        .ce          (ce && is_but),
        .lut_a       (lut_a[r][c]),
        .lut_b       (lut_b[r][c]),
        .ctrl        (ctrl[r][c]),
        .in_pat      (tpg_pat[(r < N/2) ? 0 : 1]),
        .ff_load     (ff_load[r][c]),
        .ff_load_val (ff_load_val),
        .x_out       (x_o[r][c]),
        .y_out       (y_o[r][c]),
        .a_out       (a_unused),
        .b_out       (b_unused)
      );

      if (c > 0) begin : g_yw
        assign y_nb = y_o[r][c-1];
      end else begin : g_yedge
        assign y_nb = 1'b0;
      end
      if (c < N-1 && PR < N) begin : g_xe
        assign x_nb = x_o[PR][c+1];
      end else begin : g_xedge
        assign x_nb = 1'b0;
      end

      if (K > 0) begin : g_sh
        assign sh_in = chain[K-1];
      end else begin : g_shfirst
        assign sh_in = 1'b0;
      end

      logic_ora u_ora (
        .clk, .rst_n, .ce,
        .enable   (is_ora),
        .shift    (ctrl[r][c].ora_shift),
        .x_in     (x_nb),
        .y_in     (y_nb),
        .shift_in (sh_in),
        .load     (ff_load[r][c]),
        .load_val (ff_load_val),
        .fail     (fail[r][c])
      );

      assign chain[K] = is_ora ? fail[r][c] : sh_in;
    end
  end

  assign shift_out = chain[N*N-1];

endmodule
