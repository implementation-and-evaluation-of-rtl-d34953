// batcher_banyan: the Batcher-Banyan switching core.
//
// A Batcher sorting network followed directly by a Banyan routing network.
// Packets that start together and have distinct destinations (the arbiter
// guarantees both) are sorted and packed by the Batcher stage and then
// routed without internal conflict by the Banyan stage to the output port
// named in the low bits of their first phit. Every node is self-routing, so
// the core needs no control from the arbiter. The path is combinational:
// a phit entering in cycle t leaves in cycle t.
module batcher_banyan #(
  parameter int unsigned N      = 128,
  parameter int unsigned PHIT_W = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [N-1:0]             sf_in,
  input  logic [N-1:0][PHIT_W-1:0] data_in,
  output logic [N-1:0]             sf_out,
  output logic [N-1:0][PHIT_W-1:0] data_out
);

  logic [N-1:0]             sf_mid;
  logic [N-1:0][PHIT_W-1:0] d_mid;

  batcher_network #(.N(N), .PHIT_W(PHIT_W)) u_batcher (
    .clk, .rst, .sf_in, .data_in, .sf_out(sf_mid), .data_out(d_mid)
  );

  banyan_network #(.N(N), .PHIT_W(PHIT_W)) u_banyan (
    .clk, .rst, .sf_in(sf_mid), .data_in(d_mid), .sf_out, .data_out
  );

endmodule
