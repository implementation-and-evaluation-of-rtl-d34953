// tb_crossbar: random permutations and partial connections on an 8x8
// crossbar; every output must equal the OR of the inputs connected to it.
module tb_crossbar;
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
  localparam int N = 8, W = 9;
  logic [N-1:0][W-1:0] in_bus, out_bus;
  logic [N-1:0][N-1:0] ctrl;
  crossbar #(.N(N), .W(W)) dut (.*);
  initial begin
    for (int t = 0; t < 200; t++) begin
      int perm[N];
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin int k, tmp; k = $urandom % (i + 1); tmp = perm[i]; perm[i] = perm[k]; perm[k] = tmp; end
      for (int i = 0; i < N; i++) begin
        in_bus[i] = W'($urandom);
        ctrl[i] = '0;
        if ($urandom % 4 != 0) ctrl[i][perm[i]] = 1'b1;
      end
      #1;
      for (int i = 0; i < N; i++) begin
        logic [W-1:0] expct;
        expct = '0;
        for (int k = 0; k < N; k++) if (ctrl[k][i]) expct = in_bus[k];
        check(out_bus[i] == expct, "crossbar output");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
