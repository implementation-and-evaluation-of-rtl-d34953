// tb_dpa_arbiter: Diagonal Propagation Arbiter. The 4x4 example of
// requests (0,1),(1,0),(1,2),(2,1),(3,0),(2,2),(3,3) must give grants
// (0,1),(1,0),(2,2),(3,3); random request matrices on 8x8 must get a maximal
// conflict-free set of grants; with every cell requesting, the granted
// diagonal must follow the rotating priority window.
module tb_dpa_arbiter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [3:0][3:0] req4, g4;
  logic arb4 = 0;
  dpa_arbiter #(.N(4)) dut4 (.clk, .rst, .req(req4), .arb(arb4), .grant(g4));
  localparam int M = 8;
  logic [M-1:0][M-1:0] req, grant;
  logic arb = 0;
  dpa_arbiter #(.N(M)) dut8 (.clk, .rst, .req, .arb, .grant);
  initial begin
    req4 = 0; req = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    req4[0][1] = 1; req4[1][0] = 1; req4[1][2] = 1; req4[2][1] = 1; req4[3][0] = 1; req4[2][2] = 1; req4[3][3] = 1;
    #1;
    check(g4 == 16'b1000_0100_0001_0010, $sformatf("example grants %b", g4));
    for (int t = 0; t < 300; t++) begin
      logic [M-1:0] rowg, colg;
      @(negedge clk);
      for (int i = 0; i < M; i++) req[i] = M'($urandom & $urandom);
      arb = 1;
      #1;
      rowg = 0; colg = 0;
      for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) if (grant[i][j]) begin
        check(req[i][j], "grant only to a request");
        check(!rowg[i] && !colg[j], "one grant per row and column");
        rowg[i] = 1; colg[j] = 1;
      end
      for (int i = 0; i < M; i++) for (int j = 0; j < M; j++)
        if (req[i][j] && !grant[i][j]) check(rowg[i] || colg[j], "maximal: refused requests are blocked");
    end
    // rotating priority: all requests -> the whole top diagonal wins
    @(negedge clk);
    arb = 0;
    rst = 1; @(negedge clk); rst = 0;
    for (int i = 0; i < M; i++) req[i] = '1;
    for (int p = 0; p < 2 * M; p++) begin
      #1;
      for (int i = 0; i < M; i++) check(grant[i][(p % M - i + M) % M], $sformatf("window %0d: diagonal grant", p % M));
      arb = 1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
