// routing_tpg: test pattern generator of the parity-based routing BIST.
//
// A 2-bit binary counter (C1 C0) and a parity bit. In even mode (`odd` = 0)
// the counter starts at 00 and counts up and the parity bit makes C1^C0^Par
// even; in odd mode it starts at 11, counts down, and the parity is odd. The
// three bits drive the five x4 wires of a PLB's bus: the parity bit the middle
// wire and the count bits both outer pairs, wire[0] to wire[4] being
// C1, C0, Par, C1, C0 as the figure of the routing BIST draws them top to
// bottom. `load` (a configuration write) sets the mode and restarts the
// counter; `ce` (the BIST clock) advances it. Four BIST clocks apply the full
// sequence. The pattern is combinational from the registered count.
module routing_tpg
  import bist_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             load,
  input  logic             odd,       // 0: count-up, even parity; 1: count-down, odd parity
  output logic [1:0]       count,
  output logic             parity,
  output logic [BUS_W-1:0] wires
);

  logic mode_odd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= 2'b00;
      mode_odd <= 1'b0;
    end else if (load) begin
      count    <= odd ? 2'b11 : 2'b00;
      mode_odd <= odd;
    end else if (ce) begin
      count    <= mode_odd ? count - 2'd1 : count + 2'd1;
    end
  end

  always_comb begin
    parity = count[1] ^ count[0] ^ mode_odd;
    wires  = {count[0], count[1], parity, count[0], count[1]};
  end

endmodule
