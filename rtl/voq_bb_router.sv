// voq_bb_router: N x N router with virtual-output-queue input buffering,
// Diagonal Propagation Arbiter and a Batcher-Banyan switching core.
//
// Each input port has a voq_input_unit whose shared buffer is split
// dynamically into one linked-list queue per output, so every input offers
// up to N requests at once (N*N in all). The voq_scheduler runs the DPA once
// per packet time and grants at most one queue per input and one input per
// output; the granted packets start together and the self-routing
// Batcher-Banyan core takes each to its output.
//
// Interface as fifo_bb_router. Timing: with requests waiting, a new set of
// grants is issued every PKT_PHITS cycles; grant in cycle g, sf_out and the
// first phit at the outputs in cycle g+1, last phit in cycle g+PKT_PHITS,
// so back-to-back packets leave an output without gaps.
module voq_bb_router #(
  parameter int unsigned N         = 128,
  parameter int unsigned PHIT_W    = 8,
  parameter int unsigned PKT_PHITS = 32,
  parameter int unsigned BLOCKS    = 128
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [N-1:0]             sf_in,
  input  logic [N-1:0][PHIT_W-1:0] data_in,
  output logic [N-1:0]             sf_out,
  output logic [N-1:0][PHIT_W-1:0] data_out,
  output logic [N-1:0]             drop
);

  logic [N-1:0][N-1:0]      request, grant;
  logic [N-1:0]             core_sf;
  logic [N-1:0][PHIT_W-1:0] core_data;

  for (genvar i = 0; i < N; i++) begin : g_in
    voq_input_unit #(.N(N), .PHIT_W(PHIT_W), .PKT_PHITS(PKT_PHITS), .BLOCKS(BLOCKS)) u_in (
      .clk, .rst,
      .sf_in   (sf_in[i]),
      .data_in (data_in[i]),
      .request (request[i]),
      .grant   (grant[i]),
      .sf_out  (core_sf[i]),
      .data_out(core_data[i]),
      .drop    (drop[i])
    );
  end

  voq_scheduler #(.N(N), .PKT_PHITS(PKT_PHITS)) u_sched (
    .clk, .rst, .req(request), .grant, .conn()
  );

  batcher_banyan #(.N(N), .PHIT_W(PHIT_W)) u_core (
    .clk, .rst, .sf_in(core_sf), .data_in(core_data), .sf_out, .data_out
  );

endmodule
