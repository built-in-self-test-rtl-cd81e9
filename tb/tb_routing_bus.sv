// tb_routing_bus: self-checking test of a row of x4 wire segments.
// Random input values and repeater enables; segment s of wire w must carry the
// input only when every repeater from boundary 0 to s-1 on that wire is on.
module tb_routing_bus;
  localparam int N = 48;
  localparam int NSEG = N / 4;
  logic [4:0] wires_in;
  logic [NSEG-2:0][4:0] rep_en;
  logic [NSEG-1:0][4:0] seg;
  int checks = 0, failures = 0;

  routing_bus #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      wires_in = 5'($urandom);
      for (int b = 0; b < NSEG-1; b++) rep_en[b] = (t < 10) ? 5'h1F : 5'($urandom | $urandom);
      #1;
      for (int s = 0; s < NSEG; s++)
        for (int w = 0; w < 5; w++) begin
          logic e;
          e = wires_in[w];
          for (int b = 0; b < s; b++) e = e & rep_en[b][w];
          checks++;
          if (seg[s][w] !== e) begin
            failures++;
            $display("FAIL seg %0d wire %0d", s, w);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
