// tb_banyan_node: every start-of-frame combination on a 2x2 Banyan node:
// routing by the stage bit, and the setting held after the header.
module tb_banyan_node;
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
  logic [1:0] sf_in, sf_out;
  logic [1:0][7:0] data_in, data_out;
  banyan_node #(.PHIT_W(8), .STAGE_BIT(2)) dut (.*);
  initial begin
    sf_in = 0; data_in = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 64; t++) begin
      logic [1:0] s; logic [7:0] a0, a1; int want_cross;
      s = 2'($urandom); a0 = 8'($urandom); a1 = 8'($urandom);
      if (s == 2'b11) a1[2] = ~a0[2];
      @(negedge clk);
      sf_in = s; data_in[0] = a0; data_in[1] = a1;
      #1;
      if (s[0])      want_cross = a0[2];
      else if (s[1]) want_cross = !a1[2];
      else           want_cross = -1;
      if (want_cross >= 0) begin
        check(data_out[want_cross] == a0 && sf_out[want_cross] == s[0], "input 0 routed by bit");
        check(data_out[1-want_cross] == a1 && sf_out[1-want_cross] == s[1], "input 1 on the other output");
        // body: setting is held
        @(negedge clk);
        sf_in = 0; data_in[0] = 8'h5A; data_in[1] = 8'hC3;
        #1;
        check(data_out[want_cross] == 8'h5A && data_out[1-want_cross] == 8'hC3, "setting held for the body");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
