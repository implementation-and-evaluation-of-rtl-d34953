// voq_xbar_router: N x N router with virtual-output-queue input buffering,
// Diagonal Propagation Arbiter and a crossbar switching core.
//
// As voq_bb_router, but the granted packets cross an N x N crossbar whose
// crosspoints are switched by the arbiter: the scheduler's `conn` matrix,
// the grants of the running packet slot, turns on crosspoint (i, j) for
// input i and output j while the packet passes. The crossbar carries the
// start-of-frame bit together with the phit.
//
// Interface and timing as voq_bb_router: grant in cycle g, first phit at
// the output in cycle g+1, last in cycle g+PKT_PHITS.
module voq_xbar_router #(
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

  logic [N-1:0][N-1:0]    request, grant, conn;
  logic [N-1:0][PHIT_W:0] xin, xout;   // {sf, phit}

  for (genvar i = 0; i < N; i++) begin : g_in
    voq_input_unit #(.N(N), .PHIT_W(PHIT_W), .PKT_PHITS(PKT_PHITS), .BLOCKS(BLOCKS)) u_in (
      .clk, .rst,
      .sf_in   (sf_in[i]),
      .data_in (data_in[i]),
      .request (request[i]),
      .grant   (grant[i]),
      .sf_out  (xin[i][PHIT_W]),
      .data_out(xin[i][PHIT_W-1:0]),
      .drop    (drop[i])
    );
    assign sf_out[i]   = xout[i][PHIT_W];
    assign data_out[i] = xout[i][PHIT_W-1:0];
  end

  voq_scheduler #(.N(N), .PKT_PHITS(PKT_PHITS)) u_sched (
    .clk, .rst, .req(request), .grant, .conn
  );

  crossbar #(.N(N), .W(PHIT_W + 1)) u_xbar (
    .in_bus(xin), .ctrl(conn), .out_bus(xout)
  );

endmodule
