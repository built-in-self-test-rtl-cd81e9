// logic_tpg: test pattern generator of the logic BIST.
//
// A 5-bit binary up-counter, one of the two identical counters placed in the
// TPG column. It advances by one on every BIST clock enable `ce` and wraps,
// so 32 BIST clocks apply every pattern once. A configuration write (`load`)
// initialises it to `load_val`, as the TPG flip-flops are initialised when the
// TPG is instantiated; `load` wins over `ce`. The output is the registered
// count. The 5-bit counter is the documented TPG; counting up from the loaded
// value is this design's reading.
module logic_tpg
  import bist_pkg::*;
#(
  parameter int unsigned W = TPG_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         load,
  input  logic [W-1:0] load_val,
  output logic [W-1:0] pattern
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pattern <= '0;
    else if (load) pattern <= load_val;
    else if (ce)   pattern <= pattern + 1'b1;
  end

endmodule
