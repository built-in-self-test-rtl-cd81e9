// routing_bist_array: parity-based BIST of the x4 wires and their repeaters.
//
// One routing TPG (2-bit counter plus parity) drives the five x4 wires of the
// bus of every one of the N PLB rows. Each bus is cut into N/4 segments joined
// by configurable repeaters. Two parity ORAs watch every segment: ORA A takes
// wires 4, 2 and 3 (C0, Par, C1 of the lower wire pair) and ORA B takes wires
// 1, 2 and 0 (C0, Par, C1 of the upper pair), following the two ORAs of the
// routing BIST figure. A repeater that fails to pass a wire leaves the
// downstream segments at 0, which breaks the parity at some count value in
// either TPG mode, so the ORAs of every segment past the fault latch a fail.
//
// The ORAs form one shift chain: row by row, segment by segment, A before B;
// `shift_out` is the last ORA. Everything advances on the rising clock edge
// where `ce` (the BIST clock) is high; the ORAs sample the pattern present
// before that edge. Mode, expected parity and shift mode come from the
// configuration memory. One TPG shared by all rows and the ORA placement per
// segment are this design's own choices.
module routing_bist_array
  import bist_pkg::*;
#(
  parameter int unsigned N = N_MAX,
  localparam int unsigned NSEG = N / SEG_LEN,
  localparam int unsigned NREP = (NSEG > 1) ? NSEG - 1 : 1,
  localparam int unsigned NORA = N * NSEG * 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             rtpg_load,
  input  logic             rtpg_odd,
  input  rora_ctrl_t       rora_ctrl,
  input  logic             ora_load,     // initialise every routing ORA
  input  logic             ora_load_val,
  input  logic [N-1:0][NREP-1:0][BUS_W-1:0] rep_en,
  output logic [BUS_W-1:0] tpg_wires,
  output logic [NORA-1:0]  fail,
  output logic             shift_out
);

  logic [1:0] cnt_unused;
  logic       par_unused;

  routing_tpg u_tpg (
    .clk, .rst_n, .ce,
    .load   (rtpg_load),
    .odd    (rtpg_odd),
    .count  (cnt_unused),
    .parity (par_unused),
    .wires  (tpg_wires)
  );

  for (genvar r = 0; r < N; r++) begin : g_row
    logic [NSEG-1:0][BUS_W-1:0] seg;

    routing_bus #(.N(N)) u_bus (
      .wires_in (tpg_wires),
      .rep_en   (rep_en[r]),
      .seg      (seg)
    );

    for (genvar s = 0; s < NSEG; s++) begin : g_seg
      localparam int unsigned KA = (r * NSEG + s) * 2;
      logic sh_a;
      if (KA > 0) begin : g_sh
        assign sh_a = fail[KA-1];
      end else begin : g_shfirst
        assign sh_a = 1'b0;
      end

      routing_ora u_ora_a (
        .clk, .rst_n, .ce,
        .odd      (rora_ctrl.odd),
        .shift    (rora_ctrl.shift),
        .c0       (seg[s][4]),
        .c1       (seg[s][3]),
        .par      (seg[s][2]),
        .shift_in (sh_a),
        .load     (ora_load),
        .load_val (ora_load_val),
        .fail     (fail[KA])
      );

      routing_ora u_ora_b (
        .clk, .rst_n, .ce,
        .odd      (rora_ctrl.odd),
        .shift    (rora_ctrl.shift),
        .c0       (seg[s][1]),
        .c1       (seg[s][0]),
        .par      (seg[s][2]),
        .shift_in (fail[KA]),
        .load     (ora_load),
        .load_val (ora_load_val),
        .fail     (fail[KA+1])
      );
    end
  end

  assign shift_out = fail[NORA-1];

endmodule
