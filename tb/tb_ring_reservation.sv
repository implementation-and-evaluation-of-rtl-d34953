// tb_ring_reservation: Ring-Reservation arbiter (RHE + CSIs). The 4-port
// example with head destinations 2, 3, 3, 2 must grant one input for output
// 2 and one for output 3, N+2 cycles after the request; random request sets
// on 8 ports must get a maximal set of grants with distinct outputs;
// two inputs competing for one output must both win within N+1 rounds;
// with packets longer than the ring, rounds are PKT_PHITS cycles apart.
module tb_ring_reservation;
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
  localparam int N = 4;
  logic [N-1:0] request, grant;
  logic [N-1:0][1:0] req_addr;
  ring_reservation #(.N(N), .PKT_PHITS(4)) dut4 (.*);
  localparam int M = 8;
  logic rst8 = 1;
  logic [M-1:0] request8, grant8;
  logic [M-1:0][2:0] req_addr8;
  ring_reservation #(.N(M), .PKT_PHITS(32)) dut8 (.clk, .rst(rst8), .request(request8), .req_addr(req_addr8), .grant(grant8));

  int t_req, wins[2];
  initial begin
    request = 0; req_addr = 0; request8 = 0; req_addr8 = 0;
    repeat (2) @(posedge clk);
    rst <= 0; rst8 <= 0;
    // example: destinations 2, 3, 3, 2
    @(negedge clk);
    req_addr = {2'd2, 2'd3, 2'd3, 2'd2};
    request = 4'b1111;
    t_req = 0;
    while (grant == 0) begin @(negedge clk); t_req++; end
    check(t_req == N + 2, $sformatf("grant %0d cycles after the request (expected N+2)", t_req));
    check($countones(grant) == 2, "two grants");
    check($countones(grant & 4'b1001) == 1 && $countones(grant & 4'b0110) == 1, "one winner per output");
    @(negedge clk);
    check(grant == 0, "grant is a one-cycle pulse");
    request = 0;
    repeat (10) @(negedge clk);
    // random sets on 8 ports (one round each)
    for (int t = 0; t < 60; t++) begin
      logic [M-1:0] rq; logic [M-1:0][2:0] ad; logic [M-1:0] wanted, got;
      rq = M'($urandom); for (int i = 0; i < M; i++) ad[i] = 3'($urandom);
      request8 = rq; req_addr8 = ad;
      while (grant8 == 0) @(negedge clk);
      wanted = 0; got = 0;
      for (int i = 0; i < M; i++) if (rq[i]) wanted[ad[i]] = 1;
      for (int i = 0; i < M; i++) if (grant8[i]) begin
        check(rq[i], "grant only to a requester");
        check(!got[ad[i]], "no output granted twice");
        got[ad[i]] = 1;
      end
      check(got == wanted, "every requested output granted to someone");
      request8 = 0;
      @(negedge clk);
      repeat (40) @(negedge clk);
    end
    // fairness and round spacing: inputs 0 and 1 keep asking for output 5
    begin
      int last, gaps_ok, rounds;
      wins[0] = 0; wins[1] = 0; last = -1; gaps_ok = 1; rounds = 0;
      request8 = 8'b0000_0011; req_addr8 = '0; req_addr8[0] = 3'd5; req_addr8[1] = 3'd5;
      for (int c = 0; c < 40 * (M + 1); c++) begin
        @(negedge clk);
        if (grant8 != 0) begin
          check($countones(grant8) == 1, "one winner for one output");
          if (grant8[0]) wins[0]++;
          if (grant8[1]) wins[1]++;
          if (last >= 0 && c - last < 32) gaps_ok = 0;
          last = c; rounds++;
        end
      end
      check(wins[0] > 0 && wins[1] > 0, "both competing inputs win sometimes");
      check(gaps_ok == 1 && rounds > 5, "rounds at least PKT_PHITS cycles apart");
      request8 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
