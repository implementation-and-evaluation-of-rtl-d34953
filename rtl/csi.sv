// csi: Cell Switch Interface, the per-input cell of the Ring-Reservation
// arbiter.
//
// The CSIs form a ring that circulates the N output addresses, one address
// and one reservation token per CSI. At reset a CSI loads its own position
// as its circulating address and clears its token. The Ring Head End
// broadcasts a two-bit command:
//   ROT_SCAN  (11): the CSI takes the address and token of its predecessor.
//                   If its input requests exactly that address and the token
//                   is clear (output not yet reserved), it reserves the
//                   output: sets its internal grant flag and passes the
//                   address on with the token set. Otherwise the token is
//                   passed on unchanged.
//   ROT_GRANT (10): the CSI issues its grant flag as a one-cycle grant pulse,
//                   clears flag and token, and rotates once more so that the
//                   next reservation cycle starts from a shifted ring
//                   (round-robin fairness).
//   ROT_IDLE  (00): grant low.
// After N scan cycles every CSI has seen every output address once, and each
// output is reserved by at most one input.
//
// Timing: r_data_out/token_out and grant_out are registers; a command in
// cycle c takes effect at the end of cycle c (grant pulse in cycle c+1).
// Passing an unmatched token on unchanged (rather than clearing it) is what
// lets a reservation be seen by all CSIs further round the ring.
module csi
  import router_pkg::*;
#(
  parameter int unsigned N = 128,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] position,
  input  logic          request,
  input  logic [AW-1:0] address_in,
  output logic          grant_out,
  input  rotate_cmd_e   rotate,
  input  logic [AW-1:0] r_data_in,
  input  logic          token_in,
  output logic [AW-1:0] r_data_out,
  output logic          token_out
);

  logic grant_flag, win;

  assign win = request && !grant_flag && !token_in && (r_data_in == address_in);

  always_ff @(posedge clk) begin
    if (rst) begin
      r_data_out <= position;
      token_out  <= 1'b0;
      grant_flag <= 1'b0;
      grant_out  <= 1'b0;
    end else begin
      unique case (rotate)
        ROT_SCAN: begin
          r_data_out <= r_data_in;
          token_out  <= token_in || win;
          if (win) grant_flag <= 1'b1;
          grant_out  <= 1'b0;
        end
        ROT_GRANT: begin
          r_data_out <= r_data_in;
          token_out  <= 1'b0;
          grant_out  <= grant_flag;
          grant_flag <= 1'b0;
        end
        default: grant_out <= 1'b0;
      endcase
    end
  end

endmodule
