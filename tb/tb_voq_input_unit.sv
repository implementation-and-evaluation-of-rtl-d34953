// tb_voq_input_unit: VOQ input unit. Packets for several outputs
// share the blocks through linked lists: each output's request must be
// set while its queue holds packets, a grant must read the oldest packet of
// that queue, blocks freed by reads must be reused, and a packet arriving
// with no free block must be dropped.
module tb_voq_input_unit;
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
  localparam int N = 8, W = 8, PKT = 8, BLOCKS = 4;
  logic sf_in = 0, sf_out, drop;
  logic [W-1:0] data_in = 0, data_out;
  // phit k of packet tag: phit 0 carries the destination
  function automatic logic [W-1:0] phit(int dest, int tag, int k);
    return (k == 0) ? W'(((tag & 1) << 7) | dest) : W'(tag * 16 + k);
  endfunction
  task automatic send(int dest, int tag);
    for (int k = 0; k < PKT; k++) begin
      @(negedge clk);
      sf_in = (k == 0);
      data_in = phit(dest, tag, k);
    end
    @(negedge clk); sf_in = 0; data_in = 0;
  endtask
  // read one packet after a grant and compare it to what send() wrote
  task automatic expect_pkt(int dest, int tag);
    int wait_c = 0;
    while (!sf_out && wait_c < 20) begin @(negedge clk); wait_c++; end
    check(sf_out, "sf_out after grant");
    check(wait_c <= 2, "packet starts within two cycles of the grant");
    for (int k = 0; k < PKT; k++) begin
      check(data_out == phit(dest, tag, k), $sformatf("phit %0d of packet %0d: %h", k, tag, data_out));
      check(sf_out == (k == 0), "sf_out only with phit 0");
      @(negedge clk);
    end
  endtask
  logic [N-1:0] request, grant = 0;
  voq_input_unit #(.N(N), .PHIT_W(W), .PKT_PHITS(PKT), .BLOCKS(BLOCKS)) dut (.*);
  int ndrop = 0;
  always @(posedge clk) if (drop) ndrop++;
  task automatic give(int j);
    @(negedge clk); grant = 0; grant[j] = 1; @(negedge clk); grant = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    // two packets to output 1, one to 2, one more to 1; the fifth finds no free block
    send(1, 1); send(1, 2); send(2, 3); send(1, 4); send(3, 5);
    check(ndrop == 1, $sformatf("fifth packet dropped (%0d)", ndrop));
    @(negedge clk);
    check(request == 8'b0000_0110, $sformatf("requests for outputs 1 and 2: %b", request));
    give(2); expect_pkt(2, 3);
    check(request == 8'b0000_0010, "queue 2 empty after its only packet");
    give(1); expect_pkt(1, 1);
    // freed blocks are reused: two more packets fit
    send(4, 6); send(1, 7);
    check(ndrop == 1, "freed blocks reused");
    @(negedge clk);
    check(request == 8'b0001_0010, $sformatf("requests for outputs 1 and 4: %b", request));
    give(1); expect_pkt(1, 2);
    give(4); expect_pkt(4, 6);
    give(1); expect_pkt(1, 4);
    // write and read in the same cycles
    fork
      send(5, 8);
      begin give(1); expect_pkt(1, 7); end
    join
    @(negedge clk);
    check(request == 8'b0010_0000, "only queue 5 left");
    give(5); expect_pkt(5, 8);
    repeat (3) @(negedge clk);
    check(request == 0 && ndrop == 1, "all queues empty, one drop in total");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
