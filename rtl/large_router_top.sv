// large_router_top: the three large-router architectures side by side.
//
// Three independent N x N packet routers for star-like many-core networks
// on chip, each with its own ports:
//   f_*  : FIFO input buffering + Ring-Reservation arbiter + Batcher-Banyan
//          core (smallest and most power-efficient, throughput limited by
//          head-of-line blocking);
//   vb_* : virtual output queues + Diagonal Propagation Arbiter +
//          Batcher-Banyan core;
//   vx_* : virtual output queues + Diagonal Propagation Arbiter + crossbar.
// They share clock and reset and nothing else. Every port carries a
// start-of-frame bit and a PHIT_W-bit phit per direction; packets are
// PKT_PHITS phits long and name their output port in the low bits of the
// first phit. `*_drop` pulses when a packet is discarded for lack of
// buffer space. See the router modules for timing.
module large_router_top #(
  parameter int unsigned N         = 128,
  parameter int unsigned PHIT_W    = 8,
  parameter int unsigned PKT_PHITS = 32,
  parameter int unsigned BLOCKS    = 128
) (
  input  logic                   clk,
  input  logic                   rst,
  // FIFO / Batcher-Banyan router
  input  logic [N-1:0]             f_sf_in,
  input  logic [N-1:0][PHIT_W-1:0] f_data_in,
  output logic [N-1:0]             f_sf_out,
  output logic [N-1:0][PHIT_W-1:0] f_data_out,
  output logic [N-1:0]             f_drop,
  // VOQ / Batcher-Banyan router
  input  logic [N-1:0]             vb_sf_in,
  input  logic [N-1:0][PHIT_W-1:0] vb_data_in,
  output logic [N-1:0]             vb_sf_out,
  output logic [N-1:0][PHIT_W-1:0] vb_data_out,
  output logic [N-1:0]             vb_drop,
  // VOQ / crossbar router
  input  logic [N-1:0]             vx_sf_in,
  input  logic [N-1:0][PHIT_W-1:0] vx_data_in,
  output logic [N-1:0]             vx_sf_out,
  output logic [N-1:0][PHIT_W-1:0] vx_data_out,
  output logic [N-1:0]             vx_drop
);

  fifo_bb_router #(.N(N), .PHIT_W(PHIT_W), .PKT_PHITS(PKT_PHITS), .BLOCKS(BLOCKS)) u_fifo_bb (
    .clk, .rst,
    .sf_in(f_sf_in), .data_in(f_data_in), .sf_out(f_sf_out), .data_out(f_data_out), .drop(f_drop)
  );

  voq_bb_router #(.N(N), .PHIT_W(PHIT_W), .PKT_PHITS(PKT_PHITS), .BLOCKS(BLOCKS)) u_voq_bb (
    .clk, .rst,
    .sf_in(vb_sf_in), .data_in(vb_data_in), .sf_out(vb_sf_out), .data_out(vb_data_out), .drop(vb_drop)
  );

  voq_xbar_router #(.N(N), .PHIT_W(PHIT_W), .PKT_PHITS(PKT_PHITS), .BLOCKS(BLOCKS)) u_voq_xbar (
    .clk, .rst,
    .sf_in(vx_sf_in), .data_in(vx_data_in), .sf_out(vx_sf_out), .data_out(vx_data_out), .drop(vx_drop)
  );

endmodule
