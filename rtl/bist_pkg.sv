// bist_pkg: types and constants shared by the configurable-core BIST design.
//
// The core is an N x N array of programmable logic blocks (PLBs). The processor
// writes its configuration one byte at a time at a 24-bit address made of three
// bytes: X (column), Y (row) and Z (which resource inside the addressed place).
// The 48 x 48 array size, the byte-wide write port and the X/Y/Z split follow the
// device family the design targets; the Z codes and the bit layout of every
// configuration byte below are this design's own choice.
package bist_pkg;

  // Largest array of the device family (48 x 48 PLBs).
  localparam int unsigned N_MAX = 48;

  // Width of the logic BIST test pattern (a 5-bit counter).
  localparam int unsigned TPG_W = 5;

  // Number of x4 wires in the bus associated with each PLB.
  localparam int unsigned BUS_W = 5;

  // Number of PLBs spanned by one x4 wire segment (repeater spacing).
  localparam int unsigned SEG_LEN = 4;

  // ---------------------------------------------------------------- X codes
  // X values 0 .. N-1 address PLB columns. Two X values above the array
  // address the BIST control registers and the repeater configuration.
  localparam logic [7:0] X_GLOBAL   = 8'hFF;
  localparam logic [7:0] X_REPEATER = 8'hFE;

  // ------------------------------------------------- Z codes inside a PLB
  localparam logic [7:0] Z_LUT_A  = 8'd0;  // truth table of LUT A
  localparam logic [7:0] Z_LUT_B  = 8'd1;  // truth table of LUT B
  localparam logic [7:0] Z_CTRL   = 8'd2;  // cell control byte (cell_ctrl_t)
  localparam logic [7:0] Z_FFINIT = 8'd3;  // write-only: load both cell flip-flops with data bit 0

  // ------------------------------------------- Z codes at X = X_GLOBAL
  localparam logic [7:0] Z_BIST_CTRL = 8'd0;  // bist_ctrl_t
  localparam logic [7:0] Z_TPG_INIT  = 8'd1;  // write-only: load both logic TPGs with data[4:0]
  localparam logic [7:0] Z_RTPG      = 8'd2;  // write: routing TPG mode (bit 0) and re-initialise
  localparam logic [7:0] Z_RORA      = 8'd3;  // routing ORA control (rora_ctrl_t)
  localparam logic [7:0] Z_RORA_INIT = 8'd4;  // write-only: load every routing ORA with data bit 0

  // Role of a cell in a BIST configuration.
  typedef enum logic [1:0] {
    ROLE_NONE = 2'd0,   // cleared / inactive
    ROLE_BUT  = 2'd1,   // block under test
    ROLE_ORA  = 2'd2,   // output response analyser
    ROLE_TPG  = 2'd3    // member of the TPG column (its counters sit outside the array)
  } cell_role_e;

  // Source of a PLB output.
  typedef enum logic [1:0] {
    OUT_LUTA = 2'd0,
    OUT_LUTB = 2'd1,
    OUT_FF   = 2'd2,
    OUT_NFF  = 2'd3     // inverted flip-flop output
  } out_sel_e;

  // Cell control byte (Z_CTRL), most significant field first.
  typedef struct packed {
    logic       ora_shift;  // [7]   ORA in shift-register mode
    logic       d_sel;      // [6]   PLB flip-flop D: 0 = LUT A, 1 = LUT B
    out_sel_e   y_sel;      // [5:4] orthogonal Y output source
    out_sel_e   x_sel;      // [3:2] diagonal X output source
    cell_role_e role;       // [1:0]
  } cell_ctrl_t;

  // BIST control register (X_GLOBAL, Z_BIST_CTRL).
  typedef struct packed {
    logic [4:0] rsvd;
    logic       shout_src;  // [2] shift-out source: 0 = logic ORAs, 1 = routing ORAs
    logic       shout_route;// [1] ORA shift-register output routed to the processor data bus
    logic       clk_route;  // [0] processor write strobe routed to the BIST clock
  } bist_ctrl_t;

  // Routing ORA control (X_GLOBAL, Z_RORA).
  typedef struct packed {
    logic [5:0] rsvd;
    logic       shift;      // [1] routing ORAs in shift-register mode
    logic       odd;        // [0] expected parity: 0 = even, 1 = odd
  } rora_ctrl_t;

endpackage
