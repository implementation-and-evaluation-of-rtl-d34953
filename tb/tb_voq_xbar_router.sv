// tb_voq_xbar_router: random-traffic test of the VOQ / crossbar router at a
// reduced size (8 ports, 8-phit packets, 4-block buffers). Every packet that
// is not dropped must arrive intact, in order per source/destination pair.
// A second phase at low load checks the one-packet latency: grant and
// delivery of a lone packet on an idle router.
module tb_voq_xbar_router;
  localparam int N = 8, PKT = 8, BLOCKS = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] sf_in, sf_out, drop;
  logic [N-1:0][7:0] data_in, data_out;
  int sent, delivered, dropped, errors, cycles;
  longint lat;
  logic done;

  voq_xbar_router #(.N(N), .PKT_PHITS(PKT), .BLOCKS(BLOCKS)) dut (.*);
  router_env #(.N(N), .PKT(PKT), .NPKT(60), .LOAD_PCT(90), .SEED(7), .DRAIN(200)) env (
    .clk, .rst, .sf_in, .data_in, .sf_out, .data_out, .drop,
    .sent, .delivered, .dropped, .errors, .latency_sum(lat), .cycles, .done);

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (done);
    checks++; if (errors != 0) failures++;
    checks++; if (delivered + dropped != sent || sent != N * 60) failures++;
    checks++; if (delivered < sent / 2) failures++;
    $display("voq_xbar: sent %0d delivered %0d dropped %0d errors %0d avg latency %0d cycles",
             sent, delivered, dropped, errors, delivered ? lat / delivered : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
