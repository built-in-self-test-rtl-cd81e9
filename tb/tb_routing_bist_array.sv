// tb_routing_bist_array: self-checking test of the parity routing BIST (N = 16,
// four segments per row). Fault-free runs in even and odd TPG mode must leave
// every ORA clean; a repeater switched off on one wire of one row must make
// the ORAs of every later segment of that row that watch the wire flag, and
// no other. Results are read back through the ORA shift chain.
module tb_routing_bist_array;
  import bist_pkg::*;
  localparam int N = 16;
  localparam int NSEG = N / 4;
  localparam int NREP = NSEG - 1;
  localparam int NORA = N * NSEG * 2;

  logic clk = 1'b0, rst_n = 1'b1, ce = 1'b0;
  logic rtpg_load = 1'b0, rtpg_odd = 1'b0, ora_load = 1'b0, ora_load_val = 1'b0;
  rora_ctrl_t rora_ctrl = '0;
  logic [N-1:0][NREP-1:0][4:0] rep_en = '1;
  logic [4:0] tpg_wires;
  logic [NORA-1:0] fail;
  logic shift_out;
  int checks = 0, failures = 0, n_detect = 0;

  routing_bist_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  // asynchronous reset pulse from time 1 until the first negative clock edge
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
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

  // Expected flag of ORA (row, seg, which) when wire fw of row fr is cut at
  // boundary fb (fr < 0: no fault). ORA A watches wires 4,3,2, ORA B 1,0,2.
  // A cut wire reads 0 downstream; with C0/C1 stuck at 0 or Par stuck at 0
  // parity breaks for some count value in either mode.
  function automatic bit exp_flag(int row, int seg, int which, int fr, int fb, int fw);
    if (row != fr || seg <= fb) return 0;
    if (fw == 2) return 1;
    if (which == 0) return (fw == 4 || fw == 3);
    return (fw == 1 || fw == 0);
  endfunction

  task automatic run(bit odd, int fr, int fb, int fw);
    @(negedge clk);
    rep_en = '1;
    if (fr >= 0) rep_en[fr][fb][fw] = 1'b0;
    rtpg_load = 1'b1; rtpg_odd = odd;
    rora_ctrl = '0; rora_ctrl.odd = odd;
    ora_load = 1'b1; ora_load_val = 1'b0;
    @(negedge clk);
    rtpg_load = 1'b0; ora_load = 1'b0;
    check("tpg start", tpg_wires, odd ? 5'b11111 : 5'b00000);
    for (int i = 0; i < 4; i++) begin
      ce = 1'b1; @(negedge clk); ce = 1'b0;
    end
    for (int r = 0; r < N; r++)
      for (int s = 0; s < NSEG; s++)
        for (int w = 0; w < 2; w++)
          check("ora flag", fail[(r*NSEG+s)*2+w], exp_flag(r, s, w, fr, fb, fw));
    // read out through the chain, last ORA first
    rora_ctrl.shift = 1'b1;
    begin
      int nf = 0;
      for (int k = NORA - 1; k >= 0; k--) begin
        int r, s, w;
        r = k / (NSEG * 2); s = (k / 2) % NSEG; w = k % 2;
        @(negedge clk);
        check("shift out", shift_out, exp_flag(r, s, w, fr, fb, fw));
        nf += shift_out;
        ce = 1'b1; @(negedge clk); ce = 1'b0;
      end
      if (fr >= 0 && nf > 0) n_detect++;
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1'b1;
    run(1'b0, -1, 0, 0);
    run(1'b1, -1, 0, 0);
    for (int t = 0; t < 10; t++)
      run(t[0], $urandom % N, $urandom % NREP, $urandom % 5);
    check("every repeater fault detected", n_detect, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
