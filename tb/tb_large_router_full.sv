// tb_large_router_full: the three routers at their full default size
// (128 ports, 8-bit phits, 32-phit packets, 128-block buffers).
//
// Wave 1: every input of every router sends one packet, destinations a
// permutation (output = 5*i + 3 mod 128). All 128 packets must arrive; the
// first phit must leave after exactly N+4 cycles in the FIFO router (one
// full ring-reservation cycle) and after 4 cycles in the VOQ routers (one
// DPA arbitration).
// Wave 2: every input sends one packet to output 0. The packets must leave
// output 0 one after another: one per ring-reservation cycle (N+3 cycles)
// in the FIFO router, one per packet time (32 cycles, no gaps) in the VOQ
// routers.
module tb_large_router_full;
  localparam int N = 128, PKT = 32, AW = 7;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] f_sf_in, f_sf_out, f_drop, vb_sf_in, vb_sf_out, vb_drop, vx_sf_in, vx_sf_out, vx_drop;
  logic [N-1:0][7:0] f_data_in, f_data_out, vb_data_in, vb_data_out, vx_data_in, vx_data_out;

  large_router_top dut (.*);

  function automatic logic [7:0] phit(int src, int dst, int k);
    if (k == 0) return 8'(dst);
    if (k == 1) return 8'(src);
    return 8'(src * 3 + k * 7 + dst);
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // received packets per router / output
  int rx_cnt [3];
  int rx_bad [3];
  int first_sf [3];
  int sf_times [3][$];
  int rk [3][N];
  int rsrc [3][N];

  task automatic watch(int r, logic [N-1:0] sfo, logic [N-1:0][7:0] dout);
    for (int j = 0; j < N; j++) begin
      if (sfo[j]) begin
        rk[r][j] = 0;
        if (first_sf[r] < 0) first_sf[r] = cyc;
        if (j == 0) sf_times[r].push_back(cyc);
      end
      if (rk[r][j] >= 0) begin
        if (rk[r][j] == 1) rsrc[r][j] = int'(dout[j]);
        if (rk[r][j] >= 2 && dout[j] != phit(rsrc[r][j], j, rk[r][j])) rx_bad[r]++;
        if (rk[r][j] == 0 && int'(dout[j][AW-1:0]) != j) rx_bad[r]++;
        rk[r][j]++;
        if (rk[r][j] == PKT) begin
          rk[r][j] = -1;
          rx_cnt[r]++;
        end
      end
    end
  endtask

  int t0 = -1;
  always @(posedge clk) if (!rst) begin
    if (t0 < 0 && f_sf_in[0]) t0 = cyc;
    watch(0, f_sf_out, f_data_out);
    watch(1, vb_sf_out, vb_data_out);
    watch(2, vx_sf_out, vx_data_out);
  end

  // Builds each cycle's input vectors with blocking assignments and drives
  // them with one non-blocking assignment per vector.
  task automatic send_wave(bit to_zero);
    logic [N-1:0]      sfv;
    logic [N-1:0][7:0] dv;
    for (int k = 0; k < PKT; k++) begin
      for (int i = 0; i < N; i++) begin
        int dst;
        dst = to_zero ? 0 : (5 * i + 3) % N;
        sfv[i] = (k == 0);
        dv[i]  = phit(i, dst, k);
      end
      f_sf_in <= sfv;  vb_sf_in <= sfv;  vx_sf_in <= sfv;
      f_data_in <= dv; vb_data_in <= dv; vx_data_in <= dv;
      @(posedge clk);
    end
    f_sf_in <= '0; vb_sf_in <= '0; vx_sf_in <= '0;
  endtask

  initial begin
    f_sf_in = '0; vb_sf_in = '0; vx_sf_in = '0;
    f_data_in = '0; vb_data_in = '0; vx_data_in = '0;
    for (int r = 0; r < 3; r++) begin
      rx_cnt[r] = 0; rx_bad[r] = 0; first_sf[r] = -1;
      for (int j = 0; j < N; j++) rk[r][j] = -1;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // ---- wave 1: permutation ----
    send_wave(0);
    repeat (N + 2 * PKT + 20) @(posedge clk);
    for (int r = 0; r < 3; r++) begin
      $display("wave 1 router %0d: %0d packets, %0d bad phits, first phit after %0d cycles",
               r, rx_cnt[r], rx_bad[r], first_sf[r] - t0);
      checks++; if (rx_cnt[r] != N || rx_bad[r] != 0) failures++;
    end
    checks++; if (first_sf[0] - t0 != N + 4) failures++;
    checks++; if (first_sf[1] - t0 != 4) failures++;
    checks++; if (first_sf[2] - t0 != 4) failures++;
    // ---- wave 2: everybody to output 0 ----
    for (int r = 0; r < 3; r++) begin
      rx_cnt[r] = 0; sf_times[r].delete();
    end
    send_wave(1);
    repeat (N * (N + 3) + 200) @(posedge clk);
    for (int r = 0; r < 3; r++) begin
      bit gap_ok;
      gap_ok = 1;
      for (int k = 1; k < sf_times[r].size(); k++)
        if (sf_times[r][k] - sf_times[r][k-1] != ((r == 0) ? N + 3 : PKT)) gap_ok = 0;
      $display("wave 2 router %0d: %0d packets at output 0, %0d bad phits, spacing ok %0d",
               r, rx_cnt[r], rx_bad[r], gap_ok);
      checks++; if (rx_cnt[r] != N || rx_bad[r] != 0) failures++;
      checks++; if (!gap_ok) failures++;
    end
    checks++; if ((f_drop | vb_drop | vx_drop) != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
