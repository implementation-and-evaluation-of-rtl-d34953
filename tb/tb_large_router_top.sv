// tb_large_router_top: end-to-end test of the three routers at a reduced
// size (8 ports, 8-phit packets, 4-block buffers). Each router gets its own
// random traffic: the FIFO router near saturation, the VOQ / Batcher-Banyan
// router with a hot-spot pattern, the VOQ / crossbar router at full load.
// Besides the scoreboards, the test counts how often each mechanism of the
// design occurred and fails if one never did:
//   drops (buffer full / no free block) in every router, ring-reservation
//   contention (a requesting head packet left ungranted, i.e. head-of-line
//   blocking), ring reservation cycles, VOQ inputs with several non-empty
//   queues, same-cycle write and read linked-list moves, DPA arbitrations
//   that refuse a request, back-to-back packet slots at one output.
module tb_large_router_top;
  localparam int N = 8, PKT = 8, BLOCKS = 4, NP = 80;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] f_sf_in, f_sf_out, f_drop, vb_sf_in, vb_sf_out, vb_drop, vx_sf_in, vx_sf_out, vx_drop;
  logic [N-1:0][7:0] f_data_in, f_data_out, vb_data_in, vb_data_out, vx_data_in, vx_data_out;

  large_router_top #(.N(N), .PKT_PHITS(PKT), .BLOCKS(BLOCKS)) dut (.*);

  int s[3], d[3], x[3], e[3], c[3];
  longint l[3];
  logic dn[3];

  router_env #(.N(N), .PKT(PKT), .NPKT(NP), .LOAD_PCT(95), .SEED(3), .DRAIN(300)) env_f (
    .clk, .rst, .sf_in(f_sf_in), .data_in(f_data_in), .sf_out(f_sf_out), .data_out(f_data_out), .drop(f_drop),
    .sent(s[0]), .delivered(d[0]), .dropped(x[0]), .errors(e[0]), .latency_sum(l[0]), .cycles(c[0]), .done(dn[0]));
  router_env #(.N(N), .PKT(PKT), .NPKT(NP), .LOAD_PCT(90), .HOT_PCT(30), .SEED(5), .DRAIN(300)) env_vb (
    .clk, .rst, .sf_in(vb_sf_in), .data_in(vb_data_in), .sf_out(vb_sf_out), .data_out(vb_data_out), .drop(vb_drop),
    .sent(s[1]), .delivered(d[1]), .dropped(x[1]), .errors(e[1]), .latency_sum(l[1]), .cycles(c[1]), .done(dn[1]));
  router_env #(.N(N), .PKT(PKT), .NPKT(NP), .LOAD_PCT(100), .SEED(9), .DRAIN(300)) env_vx (
    .clk, .rst, .sf_in(vx_sf_in), .data_in(vx_data_in), .sf_out(vx_sf_out), .data_out(vx_data_out), .drop(vx_drop),
    .sent(s[2]), .delivered(d[2]), .dropped(x[2]), .errors(e[2]), .latency_sum(l[2]), .cycles(c[2]), .done(dn[2]));

  // mechanism counters
  int n_drop_f, n_drop_vb, n_drop_vx, n_hol, n_ring_cycles, n_multi_q, n_both_links, n_refused, n_b2b;
  logic [N-1:0] prev_sf_vx;
  int last_end [N];

  always @(posedge clk) if (!rst) begin
    n_drop_f  += $countones(f_drop);
    n_drop_vb += $countones(vb_drop);
    n_drop_vx += $countones(vx_drop);
    if (dut.u_fifo_bb.u_arb.rotate == router_pkg::ROT_GRANT) begin
      n_ring_cycles++;
    end
    // a grant round of the ring: requesting inputs that got no grant
    if (dut.u_fifo_bb.u_arb.grant != '0)
      n_hol += $countones(dut.u_fifo_bb.u_arb.request & ~dut.u_fifo_bb.u_arb.grant);
    for (int i = 0; i < N; i++)
      if ($countones(dut.u_voq_bb.request[i]) >= 2) n_multi_q++;
    if (dut.u_voq_bb.g_in[0].u_in.wr_link && dut.u_voq_bb.g_in[0].u_in.rd_link) n_both_links++;
    if (dut.u_voq_xbar.g_in[1].u_in.wr_link && dut.u_voq_xbar.g_in[1].u_in.rd_link) n_both_links++;
    if (dut.u_voq_xbar.u_sched.arb)
      for (int i = 0; i < N; i++)
        if (dut.u_voq_xbar.request[i] != '0 && dut.u_voq_xbar.u_sched.dpa_grant[i] == '0) n_refused++;
    // back-to-back packets at an output: sf exactly PKT cycles after the previous sf
    for (int j = 0; j < N; j++)
      if (vx_sf_out[j]) begin
        if (last_end[j] == c[2]) n_b2b++;
        last_end[j] = c[2] + PKT;
      end
  end

  initial begin
    n_drop_f = 0; n_drop_vb = 0; n_drop_vx = 0; n_hol = 0; n_ring_cycles = 0;
    n_multi_q = 0; n_both_links = 0; n_refused = 0; n_b2b = 0;
    for (int j = 0; j < N; j++) last_end[j] = -1;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    wait (dn[0] && dn[1] && dn[2]);
    for (int r = 0; r < 3; r++) begin
      $display("router %0d: sent %0d delivered %0d dropped %0d errors %0d", r, s[r], d[r], x[r], e[r]);
      checks++; if (e[r] != 0) failures++;
      checks++; if (s[r] != N * NP || d[r] + x[r] != s[r]) failures++;
      checks++; if (d[r] == 0) failures++;
    end
    // the VOQ router with no hot spot must beat the FIFO router in throughput
    checks++; if (d[2] <= d[0]) failures++;
    $display("mechanisms: drop f/vb/vx %0d/%0d/%0d, ring cycles %0d, HOL-blocked requests %0d, multi-queue inputs %0d, same-cycle list moves %0d, DPA refusals %0d, back-to-back packets %0d",
             n_drop_f, n_drop_vb, n_drop_vx, n_ring_cycles, n_hol, n_multi_q, n_both_links, n_refused, n_b2b);
    checks++; if (n_drop_f == 0) failures++;
    checks++; if (n_drop_vb == 0) failures++;
    checks++; if (n_drop_vx == 0) failures++;
    checks++; if (n_ring_cycles == 0) failures++;
    checks++; if (n_hol == 0) failures++;
    checks++; if (n_multi_q == 0) failures++;
    checks++; if (n_both_links == 0) failures++;
    checks++; if (n_refused == 0) failures++;
    checks++; if (n_b2b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
