// tb_fifo_input_unit: FIFO input unit. Packets must leave in arrival
// order with their phits intact; request and req_addr must show the head
// packet's destination; a packet arriving while all blocks are full must
// be dropped; after the last read request must fall.
module tb_fifo_input_unit;
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
  logic request, grant = 0;
  logic [2:0] req_addr;
  fifo_input_unit #(.N(N), .PHIT_W(W), .PKT_PHITS(PKT), .BLOCKS(BLOCKS)) dut (.*);
  int ndrop = 0;
  always @(posedge clk) if (drop) ndrop++;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int p = 0; p < BLOCKS + 1; p++) send(p + 1, p + 1);
    check(ndrop == 1, $sformatf("one packet dropped when full (%0d)", ndrop));
    for (int p = 0; p < BLOCKS; p++) begin
      @(negedge clk);
      check(request, "request while packets are stored");
      check(req_addr == 3'(p + 1), $sformatf("req_addr shows head destination %0d", req_addr));
      grant = 1; @(negedge clk); grant = 0;
      expect_pkt(p + 1, p + 1);
      repeat (2) @(negedge clk);
    end
    check(!request, "no request when empty");
    // write and read overlapping
    fork
      begin send(5, 9); send(6, 10); end
      begin
        while (!request) @(negedge clk);
        check(req_addr == 3'd5, "head of the new stream");
        repeat (PKT) @(negedge clk);
        grant = 1; @(negedge clk); grant = 0;
        expect_pkt(5, 9);
      end
    join
    grant = 1; @(negedge clk); grant = 0;
    expect_pkt(6, 10);
    repeat (3) @(negedge clk);
    check(!request && ndrop == 1, "empty again, no extra drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
