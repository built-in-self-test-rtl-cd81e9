// plb: programmable logic block of the configurable core.
//
// Two 3-input look-up tables, one D flip-flop and output multiplexers. LUT A
// reads pattern bits in_pat[2:0] and LUT B reads in_pat[4:2] (bit 2 is shared);
// the LUT output is the truth-table bit indexed by its three inputs, MSB input
// first. The flip-flop takes LUT A or LUT B (ctrl.d_sel) on every BIST clock
// enable `ce`, and can be loaded with `ff_load_val` by a configuration write
// (`ff_load`, which wins over `ce`). The diagonal X output and the orthogonal Y
// output each select LUT A, LUT B, the flip-flop or its inverse.
//
// The LUT count, the single flip-flop and the X/Y outputs follow the target
// device; which pattern bits reach which LUT, the output choices and the
// flip-flop load are this design's own choices, since only "two 3-input LUTs,
// a D flip-flop, and additional multiplexers/gates" is known of the block.
// Outputs are combinational from the pattern and the flip-flop; the
// flip-flop updates on the rising clock edge where `ce` is high.
module plb
  import bist_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,           // BIST clock enable
  input  logic [7:0]       lut_a,        // truth table of LUT A
  input  logic [7:0]       lut_b,        // truth table of LUT B
  input  cell_ctrl_t       ctrl,
  input  logic [TPG_W-1:0] in_pat,       // test pattern from the TPG
  input  logic             ff_load,      // configuration write to the flip-flop
  input  logic             ff_load_val,
  output logic             x_out,        // diagonal (X) output
  output logic             y_out,        // orthogonal (Y) output
  output logic             a_out,        // LUT A output (for observation)
  output logic             b_out         // LUT B output (for observation)
);

  logic q;

  always_comb begin
    a_out = lut_a[in_pat[2:0]];
    b_out = lut_b[in_pat[4:2]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= 1'b0;
    else if (ff_load)  q <= ff_load_val;
    else if (ce)       q <= ctrl.d_sel ? b_out : a_out;
  end

  function automatic logic pick(out_sel_e s, logic a, logic b, logic f);
    unique case (s)
      OUT_LUTA: pick = a;
      OUT_LUTB: pick = b;
      OUT_FF:   pick = f;
      default:  pick = ~f;
    endcase
  endfunction

  always_comb begin
    x_out = pick(ctrl.x_sel, a_out, b_out, q);
    y_out = pick(ctrl.y_sel, a_out, b_out, q);
  end

endmodule
