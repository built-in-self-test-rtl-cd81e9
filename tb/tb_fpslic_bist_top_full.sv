// tb_fpslic_bist_top_full: end-to-end test of the core at its default size
// (48 x 48 PLBs, no parameter override), driven only through its ports the way the embedded processor
// drives it. For each logic BIST session it clears the array, places and
// initialises the ORAs, configures the BUTs, loads the TPGs, routes the write
// strobe to the BIST clock, gives 32 BIST clocks, turns the ORAs into a shift
// register, routes its output to the read port and reads every ORA back. It
// runs a fault-free west session, a west session with an emulated BUT fault
// followed by a partial reconfiguration of the BUTs alone (ORA results kept),
// and an east session with a fault. Then the routing BIST runs in even and odd
// mode, once with a repeater cut. Each mechanism is counted and must occur.
module tb_fpslic_bist_top_full;
  import bist_pkg::*;
  localparam int N = N_MAX;
  localparam int NSEG = N / SEG_LEN;
  localparam int NREP = NSEG - 1;

  logic clk = 1'b0, rst_n = 1'b1;
  logic cfg_we = 1'b0, iowe = 1'b0, iore = 1'b0;
  logic [7:0] fpgax = '0, fpgay = '0, fpgaz = '0, fpgad = '0;
  logic [3:0] io_addr = '0;
  logic [15:0] io_sel;
  logic [7:0] io_rdata;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_cfg = 0, n_ffinit = 0, n_bclk = 0, n_shift = 0, n_detect = 0, n_west = 0,
      n_east = 0, n_partial = 0, n_reven = 0, n_rodd = 0, n_rfault = 0, n_sel = 0;

  fpslic_bist_top dut (.*);

  always #5 clk = ~clk;

  // asynchronous reset pulse from time 1 until the first negative clock edge
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- processor bus cycles
  task automatic cfg(int x, int y, int z, int d);
    fpgax = 8'(x); fpgay = 8'(y); fpgaz = 8'(z); fpgad = 8'(d); cfg_we = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0;
    n_cfg++;
  endtask

  task automatic io_write(int a);
    io_addr = 4'(a); iowe = 1'b1;
    #1;
    check("write select line", io_sel, 1 << a);
    n_sel++;
    @(negedge clk);
    iowe = 1'b0;
  endtask

  task automatic io_read(int a, output logic bit0);
    io_addr = 4'(a); iore = 1'b1;
    #1;
    check("read select line", io_sel, 1 << a);
    bit0 = io_rdata[0];
    @(negedge clk);
    iore = 1'b0;
  endtask

  // ---- reference of the logic BIST arrangement
  cell_role_e role [N][N];

  function automatic cell_ctrl_t mk_ctrl(cell_role_e r, bit shift);
    cell_ctrl_t k;
    k = '0;
    k.role = r; k.x_sel = OUT_LUTA; k.y_sel = OUT_LUTA; k.ora_shift = shift;
    return k;
  endfunction

  // Expected ORA flag: with X and Y both showing LUT A and all 32 patterns
  // applied, a BUT whose LUT A differs from the others is seen by the ORA east
  // of it in its row (Y) and the ORA west of it in the paired row (X).
  function automatic bit ora_exp(int r, int c, int fr, int fc);
    if (fr < 0) return 0;
    if (r == fr && c == fc + 1) return 1;
    if (r == (fr ^ 1) && c == fc - 1) return 1;
    return 0;
  endfunction

  task automatic logic_session(bit east, logic [7:0] la, int fr, int fc, int fbit,
                               bit partial);
    logic b;
    // 1. clear
    cfg(X_GLOBAL, 0, Z_BIST_CTRL, 0);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        cfg(c, r, Z_CTRL, 0); cfg(c, r, Z_LUT_A, 0); cfg(c, r, Z_LUT_B, 0);
        role[r][c] = ROLE_NONE;
      end
    // 2. ORAs, with their flip-flops initialised; 3. BUTs
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int d;
        d = east ? (N - 1 - c) : c;
        if (d == 0) begin
          role[r][c] = ROLE_TPG;
          cfg(c, r, Z_CTRL, mk_ctrl(ROLE_TPG, 0));
        end else if (d % 2 == 0) begin
          role[r][c] = ROLE_ORA;
          cfg(c, r, Z_CTRL, mk_ctrl(ROLE_ORA, 0));
          cfg(c, r, Z_FFINIT, 0);
          n_ffinit++;
        end else begin
          role[r][c] = ROLE_BUT;
          cfg(c, r, Z_LUT_A, (r == fr && c == fc) ? (la ^ (8'd1 << fbit)) : la);
          cfg(c, r, Z_LUT_B, ~la);
          cfg(c, r, Z_CTRL, mk_ctrl(ROLE_BUT, 0));
        end
      end
    // 4. TPGs; 5. BIST clock from the write strobe
    cfg(X_GLOBAL, 0, Z_TPG_INIT, 0);
    cfg(X_GLOBAL, 0, Z_BIST_CTRL, 8'h01);
    // 6. 32 BIST clocks
    repeat (32) begin io_write(0); n_bclk++; end
    if (partial) begin
      // next configuration of the session: only the BUT truth tables change,
      // the fault stays in the same BUT
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          if (role[r][c] == ROLE_BUT)
            cfg(c, r, Z_LUT_A, (r == fr && c == fc) ? (~la ^ (8'd1 << fbit)) : ~la);
      cfg(X_GLOBAL, 0, Z_TPG_INIT, 0);
      repeat (32) begin io_write(0); n_bclk++; end
      n_partial++;
    end
    // 7. ORAs into a shift register; 8. its output to the processor
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        if (role[r][c] == ROLE_ORA) cfg(c, r, Z_CTRL, mk_ctrl(ROLE_ORA, 1));
    cfg(X_GLOBAL, 0, Z_BIST_CTRL, 8'h03);
    // 9. read back, last ORA first
    begin
      int nf = 0;
      for (int r = N - 1; r >= 0; r--)
        for (int c = N - 1; c >= 0; c--)
          if (role[r][c] == ROLE_ORA) begin
            io_read(1, b);
            check("ORA result", b, ora_exp(r, c, fr, fc));
            nf += b;
            io_write(0);
            n_shift++;
          end
      if (fr >= 0 && nf > 0) n_detect++;
      if (fr < 0) check("fault-free session clean", nf, 0);
    end
    if (east) n_east++; else n_west++;
  endtask

  task automatic routing_session(bit odd, int fr, int fb, int fw);
    logic b;
    int nf = 0;
    cfg(X_GLOBAL, 0, Z_BIST_CTRL, 0);
    for (int r = 0; r < N; r++)
      for (int s = 0; s < NREP; s++)
        cfg(X_REPEATER, r, s, (r == fr && s == fb) ? (5'h1F & ~(5'h1 << fw)) : 5'h1F);
    cfg(X_GLOBAL, 0, Z_RORA, odd);
    cfg(X_GLOBAL, 0, Z_RORA_INIT, 0);
    cfg(X_GLOBAL, 0, Z_RTPG, odd);
    cfg(X_GLOBAL, 0, Z_BIST_CTRL, 8'h01);
    repeat (4) begin io_write(2); n_bclk++; end
    cfg(X_GLOBAL, 0, Z_RORA, 8'h02 | odd);
    cfg(X_GLOBAL, 0, Z_BIST_CTRL, 8'h07);
    for (int k = N * NSEG * 2 - 1; k >= 0; k--) begin
      int r, s, w;
      bit e;
      r = k / (NSEG * 2); s = (k / 2) % NSEG; w = k % 2;
      e = (r == fr) && (s > fb) &&
          (fw == 2 || (w == 0 && fw >= 3) || (w == 1 && fw <= 1));
      io_read(3, b);
      check("routing ORA result", b, e);
      nf += b;
      io_write(2);
      n_shift++;
    end
    if (fr >= 0) begin
      check("repeater fault detected", int'(nf > 0), 1);
      if (nf > 0) n_rfault++;
    end else check("fault-free routing clean", nf, 0);
    if (odd) n_rodd++; else n_reven++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // the read port returns 0 while nothing is routed to it
    begin logic b; io_read(5, b); check("read data idle", b, 0); end
    logic_session(1'b0, 8'h96, -1, 0, 0, 1'b0);
    logic_session(1'b0, 8'h3C, 7, 13, 5, 1'b1);
    logic_session(1'b1, 8'hE8, N/2 + 4, N - 4, 2, 1'b0);
    routing_session(1'b0, -1, 0, 0);
    routing_session(1'b1, 11, NREP - 1, 2);
    routing_session(1'b0, N - 2, 1, 4);
    $display("config writes=%0d ff inits=%0d bist clocks=%0d shifts=%0d", n_cfg, n_ffinit, n_bclk, n_shift);
    $display("west=%0d east=%0d partial=%0d logic faults detected=%0d", n_west, n_east, n_partial, n_detect);
    $display("routing even=%0d odd=%0d repeater faults detected=%0d selects=%0d", n_reven, n_rodd, n_rfault, n_sel);
    check("config writes happened", int'(n_cfg > 0), 1);
    check("ORA flip-flop initialisation happened", int'(n_ffinit > 0), 1);
    check("BIST clocks happened", int'(n_bclk > 0), 1);
    check("shift read-out happened", int'(n_shift > 0), 1);
    check("west session ran", int'(n_west > 0), 1);
    check("east session ran", int'(n_east > 0), 1);
    check("partial reconfiguration ran", int'(n_partial > 0), 1);
    check("logic faults detected", n_detect, 2);
    check("routing even mode ran", int'(n_reven > 0), 1);
    check("routing odd mode ran", int'(n_rodd > 0), 1);
    check("repeater faults detected", n_rfault, 2);
    check("select lines used", int'(n_sel > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
