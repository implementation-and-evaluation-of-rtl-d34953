// ring_reservation: the Ring-Reservation arbiter of the FIFO router.
//
// One Ring Head End (rhe) and N Cell Switch Interfaces (csi) connected in a
// ring: CSI i takes the circulating address and token of CSI i-1 (CSI 0
// those of CSI N-1). Each input unit offers a request and the destination
// of its head packet; after a reservation cycle the arbiter returns one-cycle
// grant pulses to a set of inputs whose destinations are all distinct, so
// the packets can cross the Batcher-Banyan core together.
//
// Timing: with requests pending the grant pulses come N + 2 cycles after the
// RHE leaves IDLE, and a new cycle follows every N + 3 cycles (at least
// every PKT_PHITS cycles). Because the ring is one position further round
// at every new cycle, the CSI that meets a given output address first, and
// so wins it, changes from cycle to cycle.
module ring_reservation
  import router_pkg::*;
#(
  parameter int unsigned N         = 128,
  parameter int unsigned PKT_PHITS = 32,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0]        request,
  input  logic [N-1:0][AW-1:0] req_addr,
  output logic [N-1:0]        grant
);

  rotate_cmd_e          rotate;
  logic [N-1:0][AW-1:0] r_data;
  logic [N-1:0]         token;

  rhe #(.N(N), .PKT_PHITS(PKT_PHITS)) u_rhe (
    .clk, .rst, .global_request(|request), .rotate
  );

  for (genvar i = 0; i < N; i++) begin : g_csi
    localparam int unsigned PREV = (i == 0) ? N - 1 : i - 1;
    csi #(.N(N)) u_csi (
      .clk, .rst,
      .position  (AW'(i)),
      .request   (request[i]),
      .address_in(req_addr[i]),
      .grant_out (grant[i]),
      .rotate,
      .r_data_in (r_data[PREV]),
      .token_in  (token[PREV]),
      .r_data_out(r_data[i]),
      .token_out (token[i])
    );
  end

endmodule
