// tb_cfg_mem: self-checking test of the configuration memory.
// Random writes over the whole address space (including addresses outside
// the map) against a reference copy; load strobes must last exactly one
// cycle, one cycle after their write.
module tb_cfg_mem;
  import bist_pkg::*;
  localparam int N = 48;
  localparam int NREP = N / 4 - 1;

  logic clk = 1'b0, rst_n = 1'b1, we = 1'b0;
  logic [7:0] addr_x = '0, addr_y = '0, addr_z = '0, wdata = '0;
  logic [N-1:0][N-1:0][7:0] lut_a, lut_b;
  cell_ctrl_t [N-1:0][N-1:0] ctrl;
  logic [N-1:0][N-1:0] ff_load;
  logic ff_load_val;
  bist_ctrl_t bist_ctrl;
  rora_ctrl_t rora_ctrl;
  logic tpg_load, rtpg_load, rtpg_odd, rora_load, rora_load_val;
  logic [4:0] tpg_load_val;
  logic [N-1:0][NREP-1:0][4:0] rep_en;
  int checks = 0, failures = 0;

  cfg_mem #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  // asynchronous reset pulse from time 1 until the first negative clock edge
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic [7:0] m_a [N][N];
  logic [7:0] m_b [N][N];
  logic [7:0] m_c [N][N];
  logic [4:0] m_r [N][NREP];
  logic [7:0] m_bc, m_rc;

  task automatic wr(int x, int y, int z, int d);
    @(negedge clk);
    addr_x = 8'(x); addr_y = 8'(y); addr_z = 8'(z); wdata = 8'(d); we = 1'b1;
    @(negedge clk);
    we = 1'b0;
  endtask

  initial begin
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      m_a[r][c] = 0; m_b[r][c] = 0; m_c[r][c] = 0;
    end
    for (int r = 0; r < N; r++) for (int b = 0; b < NREP; b++) m_r[r][b] = 0;
    m_bc = 0; m_rc = 0;
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int x, y, z, d, kind;
      kind = $urandom % 4;
      d = $urandom % 256;
      if (kind == 0)      begin x = 255; y = $urandom % 256; z = $urandom % 6; end
      else if (kind == 1) begin x = 254; y = $urandom % (N + 2); z = $urandom % (NREP + 2); end
      else                begin x = $urandom % (N + 3); y = $urandom % (N + 3); z = $urandom % 5; end
      wr(x, y, z, d);
      // strobes are visible in the cycle right after the write
      if (x < N && y < N && z == 3) begin
        check("ff_load", ff_load[y][x], 1);
        check("ff_load_val", ff_load_val, d % 2);
      end
      if (x == 255 && z == 1) begin
        check("tpg_load", tpg_load, 1); check("tpg_load_val", tpg_load_val, d % 32);
      end else check("tpg_load idle", tpg_load, 0);
      if (x == 255 && z == 2) begin
        check("rtpg_load", rtpg_load, 1); check("rtpg_odd", rtpg_odd, d % 2);
      end else check("rtpg_load idle", rtpg_load, 0);
      if (x == 255 && z == 4) begin
        check("rora_load", rora_load, 1); check("rora_load_val", rora_load_val, d % 2);
      end else check("rora_load idle", rora_load, 0);
      // reference update
      if (x < N && y < N) begin
        if (z == 0) m_a[y][x] = 8'(d);
        if (z == 1) m_b[y][x] = 8'(d);
        if (z == 2) m_c[y][x] = 8'(d);
      end else if (x == 255) begin
        if (z == 0) m_bc = 8'(d);
        if (z == 3) m_rc = 8'(d);
      end else if (x == 254 && y < N && z < NREP) m_r[y][z] = 5'(d);
      @(negedge clk);
      if (x < N && y < N) check("ff_load one cycle", ff_load[y][x], 0);
      check("bist_ctrl", bist_ctrl, m_bc);
      check("rora_ctrl", rora_ctrl, m_rc);
      if (y < N && x < N) begin
        check("lut_a", lut_a[y][x], m_a[y][x]);
        check("lut_b", lut_b[y][x], m_b[y][x]);
        check("ctrl", ctrl[y][x], m_c[y][x]);
      end
    end
    // final full compare
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      check("lut_a all", lut_a[r][c], m_a[r][c]);
      check("lut_b all", lut_b[r][c], m_b[r][c]);
      check("ctrl all", ctrl[r][c], m_c[r][c]);
    end
    for (int r = 0; r < N; r++) for (int b = 0; b < NREP; b++)
      check("rep_en", rep_en[r][b], m_r[r][b]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
