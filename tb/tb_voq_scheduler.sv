// tb_voq_scheduler: slot timing around the DPA: a grant pulse when
// requests appear, then one every PKT_PHITS cycles while they persist, each
// valid; conn equals the last grant, one cycle later, and is held.
module tb_voq_scheduler;
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
  localparam int N = 4, PKT = 8;
  logic [N-1:0][N-1:0] req, grant, conn;
  voq_scheduler #(.N(N), .PKT_PHITS(PKT)) dut (.*);
  initial begin
    int first, last, n;
    logic [N-1:0][N-1:0] lastg;
    req = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    repeat (3) @(negedge clk);
    check(grant == 0, "no grant without requests");
    req[0] = 4'b0110; req[2] = 4'b0010; req[3] = 4'b1000;
    first = -1; last = -1; n = 0;
    for (int c = 0; c < 10 * PKT; c++) begin
      @(negedge clk);
      if (grant != 0) begin
        if (first < 0) first = c;
        if (last >= 0) check(c - last == PKT, "grants one packet time apart");
        last = c; n++;
        for (int i = 0; i < N; i++) begin
          check((grant[i] & ~req[i]) == 0 && $countones(grant[i]) <= 1, "valid grant row");
        end
        check(grant[3] == 4'b1000, "uncontested request always granted");
        lastg = grant;
      end else if (last >= 0) begin
        check(conn == lastg, "conn holds the grant of the running slot");
      end
    end
    check(first == 0, "first grant right after the requests appear");
    check(n == 10, "one grant per slot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
