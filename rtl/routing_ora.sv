// routing_ora: parity-checking output response analyser of the routing BIST.
//
// It receives three wires that left the routing TPG as C0, C1 and the parity
// bit. On every BIST clock enable `ce` it computes their parity and latches a
// failure when it differs from the expected parity `odd` (0 = even); the
// flag stays set. In shift mode the flag instead takes `shift_in`, so the
// ORAs form a shift register for read-out. `load` (configuration write)
// initialises the flag and wins over `ce`. That the ORA checks parity is this
// design's reading of the parity-based approach; the figure only shows each
// ORA taking one wire of each kind.
module routing_ora (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  logic odd,
  input  logic shift,
  input  logic c0,
  input  logic c1,
  input  logic par,
  input  logic shift_in,
  input  logic load,
  input  logic load_val,
  output logic fail
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       fail <= 1'b0;
    else if (load)    fail <= load_val;
    else if (ce) begin
      if (shift)      fail <= shift_in;
      else            fail <= fail | ((c0 ^ c1 ^ par) != odd);
    end
  end

endmodule
