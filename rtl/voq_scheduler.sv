// voq_scheduler: arbitration timing for the two VOQ routers.
//
// Wraps the Diagonal Propagation Arbiter with the packet-slot timing that
// lets all granted packets cross the switching core together. Whenever no
// slot is running and some virtual queue requests, the DPA result is
// registered as a one-cycle grant pulse to the input units and a slot of
// PKT_PHITS cycles starts; the next arbitration is evaluated in the last
// cycle of the slot, so back-to-back slots follow each other without gaps
// (one arbitration per packet time). The DPA priority window moves on at
// every arbitration.
//
// `conn` holds the grant matrix of the running slot, delayed by one cycle so
// that it covers exactly the cycles in which the granted input units drive
// their packets (grant in cycle g, packet in cycles g+1 .. g+PKT_PHITS); the
// crossbar router uses it as crosspoint control.
//
// The slot timing is this design's choice: the arbiter itself is described
// only as a combinational circuit evaluated once per arbitration cycle.
module voq_scheduler #(
  parameter int unsigned N         = 128,
  parameter int unsigned PKT_PHITS = 32,
  localparam int unsigned CW = $clog2(PKT_PHITS)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0][N-1:0] req,
  output logic [N-1:0][N-1:0] grant,   // pulse to the input units
  output logic [N-1:0][N-1:0] conn     // held for the packet time
);

  logic [N-1:0][N-1:0] dpa_grant;
  logic [CW-1:0]       cnt;
  logic                arb;

  assign arb = (cnt == '0) && (|req);

  dpa_arbiter #(.N(N)) u_dpa (
    .clk, .rst, .req, .arb, .grant(dpa_grant)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      for (int i = 0; i < N; i++) begin
        grant[i] <= '0;
        conn[i]  <= '0;
      end
    end else begin
      if (arb) begin
        grant <= dpa_grant;
        cnt   <= CW'(PKT_PHITS - 1);
      end else begin
        for (int i = 0; i < N; i++) grant[i] <= '0;
        if (cnt != '0) cnt <= cnt - 1'b1;
      end
      if (|grant) conn <= grant;
    end
  end

endmodule
