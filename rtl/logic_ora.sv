// logic_ora: comparison-based output response analyser of the logic BIST.
//
// In compare mode the flip-flop latches a mismatch: on every BIST clock enable
// `ce` it becomes 1 when `x_in` (a diagonal X output of one block under test)
// differs from `y_in` (an orthogonal Y output of another), and stays 1 after
// that. In shift mode (`shift`) the same flip-flop takes `shift_in` on each
// `ce`, so a chain of analysers forms a shift register; switching the mode
// changes nothing in the stored results. A configuration write (`load`)
// initialises the flip-flop and wins over `ce`. `fail` is the registered flag.
//
// The comparison of an X and a Y output, the latching of mismatches and the
// shift-register reconfiguration follow the described BIST; the sticky OR
// form of the latch and the load are this design's choices.
module logic_ora (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  logic enable,    // cell is configured as an ORA
  input  logic shift,     // shift-register mode
  input  logic x_in,
  input  logic y_in,
  input  logic shift_in,
  input  logic load,
  input  logic load_val,
  output logic fail
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              fail <= 1'b0;
    else if (load)           fail <= load_val;
    else if (ce && enable) begin
      if (shift)             fail <= shift_in;
      else                   fail <= fail | (x_in ^ y_in);
    end
  end

endmodule
