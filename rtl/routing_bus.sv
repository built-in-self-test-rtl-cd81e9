// routing_bus: the five horizontal x4 wires along one PLB row.
//
// Each wire is cut into segments of four PLBs; a repeater sits on every
// segment boundary, as in the repeater drawing of the core architecture. The
// west end of segment 0 is driven by `wires_in`. A repeater that is enabled
// (`rep_en[b][w]`, boundary b between segment b and b+1, wire w) drives
// segment b+1 from segment b; a disabled repeater leaves segment b+1 undriven,
// which this model reads as 0 (a weak pull-down). Repeaters here drive west to
// east only; the real ones also work the other way, which this model leaves
// out. `seg` gives the value on every segment and is purely combinational.
module routing_bus
  import bist_pkg::*;
#(
  parameter int unsigned N = N_MAX,
  localparam int unsigned NSEG = N / SEG_LEN,
  localparam int unsigned NREP = (NSEG > 1) ? NSEG - 1 : 1
) (
  input  logic [BUS_W-1:0] wires_in,
  input  logic [NREP-1:0][BUS_W-1:0] rep_en,
  output logic [NSEG-1:0][BUS_W-1:0] seg
);

  assign seg[0] = wires_in;
  for (genvar s = 1; s < NSEG; s++) begin : g_seg
    assign seg[s] = seg[s-1] & rep_en[s-1];
  end

endmodule
