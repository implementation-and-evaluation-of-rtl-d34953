// banyan_network: log2(N)-stage self-routing Banyan network of banyan_node.
//
// Each stage first applies a perfect shuffle to the N lines (line x moves to
// line x rotated left by one bit) and then switches lines 2m and 2m+1 in
// node m; stage k (k = 0 first) examines destination bit AW-1-k, so the most
// significant bit is used first. After the last stage a packet sits on the
// output line equal to its destination. The network is non-blocking for
// packets with distinct destinations that arrive sorted by destination on
// consecutive lines, which is what the Batcher sorter delivers. Combinational
// for the header, node settings held for the body of the packet.
module banyan_network #(
  parameter int unsigned N      = 128,
  parameter int unsigned PHIT_W = 8,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [N-1:0]             sf_in,
  input  logic [N-1:0][PHIT_W-1:0] data_in,
  output logic [N-1:0]             sf_out,
  output logic [N-1:0][PHIT_W-1:0] data_out
);

  for (genvar k = 0; k < AW; k++) begin : g_stage
    logic [N-1:0]             sf_i, sf_sh, sf_o;
    logic [N-1:0][PHIT_W-1:0] d_i, d_sh, d_o;
    if (k == 0) begin : g_first
      assign sf_i = sf_in;
      assign d_i  = data_in;
    end else begin : g_next
      assign sf_i = g_stage[k-1].sf_o;
      assign d_i  = g_stage[k-1].d_o;
    end
    // perfect shuffle: line x -> line rotl(x)
    for (genvar x = 0; x < N; x++) begin : g_shuffle
      localparam int unsigned Y = ((x << 1) | (x >> (AW - 1))) & (N - 1);
      assign sf_sh[Y] = sf_i[x];
      assign d_sh[Y]  = d_i[x];
    end
    for (genvar m = 0; m < N / 2; m++) begin : g_node
      banyan_node #(.PHIT_W(PHIT_W), .STAGE_BIT(AW - 1 - k)) u_node (
        .clk, .rst,
        .sf_in   ({sf_sh[2*m+1], sf_sh[2*m]}),
        .data_in ({d_sh[2*m+1],  d_sh[2*m]}),
        .sf_out  ({sf_o[2*m+1], sf_o[2*m]}),
        .data_out({d_o[2*m+1],  d_o[2*m]})
      );
    end
  end

  assign sf_out   = g_stage[AW-1].sf_o;
  assign data_out = g_stage[AW-1].d_o;

endmodule
