// tb_batcher_banyan: packets with distinct destinations on random input
// lines of a 16x16 Batcher-Banyan core: each must reach the output equal to
// its destination, in the same cycle (combinational path).
module tb_batcher_banyan;
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
  localparam int N = 16, PKT = 6;
  logic [N-1:0] sf_in, sf_out;
  logic [N-1:0][7:0] data_in, data_out;
  batcher_banyan #(.N(N), .PHIT_W(8)) dut (.*);
  function automatic logic [7:0] body(int src, int k);
    return 8'(src * 13 + k * 3 + 1);
  endfunction
  initial begin
    sf_in = 0; data_in = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 150; t++) begin
      int k, dst[N], src_of_line[N], exp_line[N];
      int perm[N];
      // k distinct random destinations
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin int r, tmp; r = $urandom % (i + 1); tmp = perm[i]; perm[i] = perm[r]; perm[r] = tmp; end
      k = (t == 0) ? N : (t == 1) ? 1 : int'($urandom % (N + 1));
      for (int i = 0; i < N; i++) src_of_line[i] = -1;
      if (2 == 1) begin
        // sorted ascending, packed on the highest lines
        int sorted[$];
        for (int i = 0; i < k; i++) sorted.push_back(perm[i]);
        sorted.sort();
        for (int i = 0; i < k; i++) begin src_of_line[N - k + i] = N - k + i; dst[N - k + i] = sorted[i]; end
      end else begin
        int lines[N];
        for (int i = 0; i < N; i++) lines[i] = i;
        for (int i = N - 1; i > 0; i--) begin int r, tmp; r = $urandom % (i + 1); tmp = lines[i]; lines[i] = lines[r]; lines[r] = tmp; end
        for (int i = 0; i < k; i++) begin src_of_line[lines[i]] = lines[i]; dst[lines[i]] = perm[i]; end
      end
      // expected output line of each source line
      for (int i = 0; i < N; i++) exp_line[i] = -1;
      if (2 == 0) begin
        int rank;
        for (int i = 0; i < N; i++) if (src_of_line[i] >= 0) begin
          rank = 0;
          for (int m = 0; m < N; m++) if (src_of_line[m] >= 0 && dst[m] < dst[i]) rank++;
          exp_line[i] = N - k + rank;
        end
      end else begin
        for (int i = 0; i < N; i++) if (src_of_line[i] >= 0) exp_line[i] = dst[i];
      end
      for (int ph = 0; ph < PKT; ph++) begin
        logic [N-1:0] sfv; logic [N-1:0][7:0] dv;
        @(negedge clk);
        for (int i = 0; i < N; i++) begin
          sfv[i] = (ph == 0) && (src_of_line[i] >= 0);
          dv[i]  = (src_of_line[i] < 0) ? 8'($urandom & 8'h7f) : (ph == 0) ? 8'(dst[i]) : body(i, ph);
        end
        sf_in = sfv; data_in = dv;
        #1;
        for (int i = 0; i < N; i++) if (src_of_line[i] >= 0) begin
          check(data_out[exp_line[i]] == dv[i], "packet on its expected line");
          if (ph == 0) check(sf_out[exp_line[i]], "start of frame travels with the header");
        end
        if (ph == 0) check($countones(sf_out) == k, "no extra start of frame");
      end
      // idle gap
      @(negedge clk);
      sf_in = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
