// tb_batcher_node: ascending and descending 2x2 sorting nodes: address
// comparison, lone packets, and the setting held for the body.
module tb_batcher_node;
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
  logic [1:0] sf_in, sfa, sfd;
  logic [1:0][7:0] data_in, da, dd;
  batcher_node #(.PHIT_W(8), .AW(7), .ASCEND(1'b1)) u_asc (.clk, .rst, .sf_in, .data_in, .sf_out(sfa), .data_out(da));
  batcher_node #(.PHIT_W(8), .AW(7), .ASCEND(1'b0)) u_dsc (.clk, .rst, .sf_in, .data_in, .sf_out(sfd), .data_out(dd));
  initial begin
    sf_in = 0; data_in = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 100; t++) begin
      logic [1:0] s; logic [7:0] a0, a1; logic [7:0] lo, hi;
      s = 2'($urandom); a0 = {1'b0, 7'($urandom)}; a1 = {1'b0, 7'($urandom)};
      if (s == 0) continue;
      @(negedge clk);
      sf_in = s; data_in[0] = a0; data_in[1] = a1;
      #1;
      if (s == 2'b11) begin
        lo = (a0 < a1) ? a0 : a1; hi = (a0 < a1) ? a1 : a0;
        check(da[0] == lo && da[1] == hi, "ascending: smaller on top");
        check(dd[0] == hi && dd[1] == lo, "descending: larger on top");
      end else begin
        lo = s[0] ? a0 : a1;
        check(da[1] == lo && sfa[1] && !sfa[0], "ascending: lone packet to the lower output");
        check(dd[0] == lo && sfd[0] && !sfd[1], "descending: lone packet to the upper output");
      end
      @(negedge clk);
      sf_in = 0; data_in[0] = 8'h11; data_in[1] = 8'h22;
      #1;
      if (s == 2'b11) check((da[0] == 8'h11) == (a0 <= a1), "ascending setting held");
      else            check((da[1] == 8'h11) == s[0], "lone-packet setting held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
