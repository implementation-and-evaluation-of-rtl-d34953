// fifo_bb_router: N x N router with FIFO input buffering, Ring-Reservation
// arbitration and a Batcher-Banyan switching core.
//
// Each input port has a fifo_input_unit that stores arriving packets in one
// queue and requests the output named by the packet at its head. The
// Ring-Reservation arbiter picks, once per reservation cycle (N + 3 clocks
// with requests pending), a set of head packets with distinct destinations
// and grants them all in the same cycle. The granted units then send their
// packets simultaneously into the self-routing Batcher-Banyan core, which
// delivers each to the output port in the low bits of its first phit.
//
// Interface: per port a start-of-frame bit and an 8-bit phit in each
// direction; a packet is PKT_PHITS consecutive phits, the first one marked
// by sf. `drop` pulses when an arriving packet finds its buffer full.
// Timing: grant pulse in cycle g, sf_out and the first phit at the output in
// cycle g+1 (the core is combinational), last phit in cycle g+PKT_PHITS.
// Since only the head packet of each queue can compete, a packet blocked at
// the head holds back the others (head-of-line blocking).
module fifo_bb_router #(
  parameter int unsigned N         = 128,
  parameter int unsigned PHIT_W    = 8,
  parameter int unsigned PKT_PHITS = 32,
  parameter int unsigned BLOCKS    = 128,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [N-1:0]             sf_in,
  input  logic [N-1:0][PHIT_W-1:0] data_in,
  output logic [N-1:0]             sf_out,
  output logic [N-1:0][PHIT_W-1:0] data_out,
  output logic [N-1:0]             drop
);

  logic [N-1:0]             request, grant, core_sf;
  logic [N-1:0][AW-1:0]     req_addr;
  logic [N-1:0][PHIT_W-1:0] core_data;

  for (genvar i = 0; i < N; i++) begin : g_in
    fifo_input_unit #(.N(N), .PHIT_W(PHIT_W), .PKT_PHITS(PKT_PHITS), .BLOCKS(BLOCKS)) u_in (
      .clk, .rst,
      .sf_in   (sf_in[i]),
      .data_in (data_in[i]),
      .request (request[i]),
      .req_addr(req_addr[i]),
      .grant   (grant[i]),
      .sf_out  (core_sf[i]),
      .data_out(core_data[i]),
      .drop    (drop[i])
    );
  end

  ring_reservation #(.N(N), .PKT_PHITS(PKT_PHITS)) u_arb (
    .clk, .rst, .request, .req_addr, .grant
  );

  batcher_banyan #(.N(N), .PHIT_W(PHIT_W)) u_core (
    .clk, .rst, .sf_in(core_sf), .data_in(core_data), .sf_out, .data_out
  );

endmodule
