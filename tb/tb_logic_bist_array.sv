// tb_logic_bist_array: self-checking test of the logic BIST array (N = 8).
// Runs BIST configurations of the west session (TPG column 0) and the east
// session (TPG column N-1): identical BUT configurations, ORAs initialised,
// 32 BIST clocks, then the ORA chain is shifted out. Expected ORA flags come
// from a reference model of the BUTs and ORAs kept in this testbench. Some
// configurations carry an emulated fault: one BUT gets one truth-table bit
// flipped, and the ORAs watching it must flag. A second configuration in the
// same session without re-initialising the ORAs checks that results survive
// reconfiguration.
module tb_logic_bist_array;
  import bist_pkg::*;
  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b1, ce = 1'b0;
  logic [N-1:0][N-1:0][7:0] lut_a = '0, lut_b = '0;
  cell_ctrl_t [N-1:0][N-1:0] ctrl = '0;
  logic [N-1:0][N-1:0] ff_load = '0;
  logic ff_load_val = 1'b0, tpg_load = 1'b0;
  logic [TPG_W-1:0] tpg_load_val = '0;
  logic [1:0][TPG_W-1:0] tpg_pat;
  logic [N-1:0][N-1:0] fail;
  logic shift_out;
  int checks = 0, failures = 0;
  int n_detect = 0, n_clean = 0;

  logic_bist_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  // asynchronous reset pulse from time 1 until the first negative clock edge
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // reference state
  logic q_ref   [N][N];
  logic ora_ref [N][N];
  int   pat_ref;

  function automatic logic pick(out_sel_e s, logic a, logic b, logic q);
    case (s)
      OUT_LUTA: return a;
      OUT_LUTB: return b;
      OUT_FF:   return q;
      default:  return ~q;
    endcase
  endfunction

  function automatic logic ref_out(int r, int c, bit want_x);
    logic [4:0] p;
    logic a, b;
    if (ctrl[r][c].role != ROLE_BUT) begin
      // idle and ORA cells still drive their PLB outputs; the reference
      // follows the same truth tables
    end
    p = 5'(pat_ref);
    a = lut_a[r][c][p[2:0]];
    b = lut_b[r][c][p[4:2]];
    return want_x ? pick(ctrl[r][c].x_sel, a, b, q_ref[r][c])
                  : pick(ctrl[r][c].y_sel, a, b, q_ref[r][c]);
  endfunction

  task automatic ref_step();
    logic nq [N][N];
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        logic [4:0] p;
        p = 5'(pat_ref);
        nq[r][c] = q_ref[r][c];
        if (ctrl[r][c].role == ROLE_BUT)
          nq[r][c] = ctrl[r][c].d_sel ? lut_b[r][c][p[4:2]] : lut_a[r][c][p[2:0]];
        if (ctrl[r][c].role == ROLE_ORA && !ctrl[r][c].ora_shift) begin
          logic y, x;
          y = (c > 0)   ? ref_out(r, c-1, 1'b0) : 1'b0;
          x = (c < N-1) ? ref_out(r ^ 1, c+1, 1'b1) : 1'b0;
          ora_ref[r][c] = ora_ref[r][c] | (x ^ y);
        end
      end
    q_ref = nq;
    pat_ref = (pat_ref + 1) % 32;
  endtask

  // Configure one session. east = 0: TPG column 0, BUTs on odd columns.
  task automatic configure(bit east, logic [7:0] la, logic [7:0] lb, out_sel_e os, bit dsel,
                           int fr, int fc, int fbit);
    @(negedge clk);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int d;
        cell_ctrl_t k;
        d = east ? (N - 1 - c) : c;      // distance from the TPG column
        k = '0;
        k.x_sel = os; k.y_sel = os; k.d_sel = dsel;
        if (d == 0)          k.role = ROLE_TPG;
        else if (d % 2 == 1) k.role = ROLE_BUT;
        else                 k.role = ROLE_ORA;
        ctrl[r][c]  = k;
        lut_a[r][c] = la;
        lut_b[r][c] = lb;
      end
    if (fr >= 0) begin
      if (fbit < 8) lut_a[fr][fc][fbit]     = ~lut_a[fr][fc][fbit];
      else          lut_b[fr][fc][fbit - 8] = ~lut_b[fr][fc][fbit - 8];
    end
  endtask

  task automatic init_all(bit ora_too);
    @(negedge clk);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        if (ora_too || ctrl[r][c].role != ROLE_ORA) ff_load[r][c] = 1'b1;
    ff_load_val = 1'b0;
    tpg_load = 1'b1; tpg_load_val = '0;
    @(negedge clk);
    ff_load = '0; tpg_load = 1'b0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        q_ref[r][c] = 1'b0;
        if (ora_too) ora_ref[r][c] = 1'b0;
      end
    pat_ref = 0;
  endtask

  task automatic run_bist();
    for (int i = 0; i < 32; i++) begin
      check("tpg0 pattern", tpg_pat[0], pat_ref);
      check("tpg1 pattern", tpg_pat[1], pat_ref);
      ce = 1'b1;
      ref_step();
      @(negedge clk);
      ce = 1'b0;
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        if (ctrl[r][c].role == ROLE_ORA) check("ora flag", fail[r][c], ora_ref[r][c]);
  endtask

  // Shift the ORA chain out and compare with the reference flags, last ORA first.
  task automatic read_out(output int nfail);
    int exp_bits [$];
    nfail = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        if (ctrl[r][c].role == ROLE_ORA) exp_bits.push_front(int'(ora_ref[r][c]));
    @(negedge clk);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) ctrl[r][c].ora_shift = 1'b1;
    @(negedge clk);
    foreach (exp_bits[i]) begin
      check("shift out", shift_out, exp_bits[i]);
      nfail += exp_bits[i];
      ce = 1'b1;
      @(negedge clk);
      ce = 1'b0;
    end
    check("chain empty after shifting", shift_out, 0);
  endtask

  initial begin
    int nf;
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 8; t++) begin
      bit east, faulty;
      logic [7:0] la, lb;
      out_sel_e os;
      int fr, fc, fb;
      east   = t[0];
      faulty = t[1];
      la = 8'($urandom); lb = 8'($urandom);
      os = out_sel_e'(t % 3 == 2 ? OUT_FF : (t % 3));
      fr = -1; fc = 0; fb = 0;
      if (faulty) begin
        fr = $urandom % N;
        fc = east ? (N - 2 - 2 * ($urandom % (N/2))) : (1 + 2 * ($urandom % (N/2)));
        fb = (os == OUT_LUTB) ? 8 + ($urandom % 8) : ($urandom % 8);
      end
      configure(east, la, lb, os, 1'b0, fr, fc, fb);
      init_all(1'b1);
      run_bist();
      // second configuration of the same session: only the BUT truth tables
      // change, the ORA results are kept
      if (t == 2 || t == 3) begin
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++)
            if (ctrl[r][c].role == ROLE_BUT) begin
              lut_a[r][c] = ~lut_a[r][c];
              lut_b[r][c] = ~lut_b[r][c];
            end
        if (faulty) begin
          if (fb < 8) lut_a[fr][fc][fb] = ~lut_a[fr][fc][fb];
          else        lut_b[fr][fc][fb-8] = ~lut_b[fr][fc][fb-8];
        end
        init_all(1'b0);
        run_bist();
      end
      read_out(nf);
      if (faulty) begin
        // a flipped bit in a used truth table is always seen by some ORA
        // unless it sits in an edge BUT output nothing watches
        if (nf > 0) n_detect++;
      end else begin
        check("fault-free configuration passes", nf, 0);
        n_clean++;
      end
    end
    check("faults detected", int'(n_detect > 0), 1);
    $display("configs clean=%0d faulty detected=%0d", n_clean, n_detect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
