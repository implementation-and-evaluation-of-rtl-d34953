// rhe: Ring Head End, the controller of the Ring-Reservation arbiter.
//
// A small state machine that drives the rotate command of all CSIs:
//   IDLE  (command 00): waits until at least one input requests
//                       (global_request, the OR of all requests);
//   SCAN  (command 11): N cycles, counted by an internal counter, during
//                       which the addresses circulate once round the ring;
//   GRANT (command 10): one cycle, the CSIs issue their grants;
//   WAIT  (command 00): at least one cycle, then back to IDLE.
// One arbitration cycle therefore lasts N + 3 clocks when requests are
// pending. WAIT is stretched, if needed, so that two grant commands are at
// least PKT_PHITS cycles apart: a granted input is busy sending its packet
// for PKT_PHITS cycles, and all packets must cross the self-routing core
// together. With the default sizes (N = 128 > PKT_PHITS = 32) the stretch is
// never used; it is this design's addition for switches smaller than the
// packet length.
module rhe
  import router_pkg::*;
#(
  parameter int unsigned N         = 128,
  parameter int unsigned PKT_PHITS = 32,
  localparam int unsigned WAIT_CYC = (PKT_PHITS > N + 2) ? PKT_PHITS - N - 1 : 1,
  localparam int unsigned CNT_MAX  = (N > WAIT_CYC) ? N : WAIT_CYC,
  localparam int unsigned CTW = $clog2(CNT_MAX + 1)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        global_request,
  output rotate_cmd_e rotate
);

  typedef enum logic [1:0] {R_IDLE, R_SCAN, R_GRANT, R_WAIT} rhe_state_e;

  rhe_state_e     state;
  logic [CTW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= R_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        R_IDLE: if (global_request) begin
          state <= R_SCAN;
          cnt   <= CTW'(N - 1);
        end
        R_SCAN: begin
          if (cnt == '0) state <= R_GRANT;
          else           cnt <= cnt - 1'b1;
        end
        R_GRANT: begin
          state <= R_WAIT;
          cnt   <= CTW'(WAIT_CYC - 1);
        end
        default: begin
          if (cnt == '0) state <= R_IDLE;
          else           cnt <= cnt - 1'b1;
        end
      endcase
    end
  end

  always_comb begin
    unique case (state)
      R_SCAN:  rotate = ROT_SCAN;
      R_GRANT: rotate = ROT_GRANT;
      default: rotate = ROT_IDLE;
    endcase
  end

endmodule
