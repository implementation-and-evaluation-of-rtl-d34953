// batcher_node: 2x2 sorting element of the Batcher network.
//
// Two multiplexers pass the two input channels straight or swapped. On a
// start of frame the controller compares the full destination addresses
// (low AW bits of phit 0). An ascending node (ASCEND = 1) puts the smaller
// address on output 0 and a lone packet on output 1; a descending node puts
// the larger address on output 0 and a lone packet on output 0. An idle
// input therefore sorts as if it had the smallest address, which leaves the
// packets sorted and packed together at the bottom of the network. The
// setting applies in the start cycle and is held for the rest of the packet.
module batcher_node #(
  parameter int unsigned PHIT_W = 8,
  parameter int unsigned AW     = 7,   // destination address bits
  parameter bit          ASCEND = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [1:0]             sf_in,
  input  logic [1:0][PHIT_W-1:0] data_in,
  output logic [1:0]             sf_out,
  output logic [1:0][PHIT_W-1:0] data_out
);

  logic          swap, swap_q;
  logic [AW-1:0] a0, a1;

  assign a0 = data_in[0][AW-1:0];
  assign a1 = data_in[1][AW-1:0];

  always_comb begin
    unique case (sf_in)
      2'b11:   swap = ASCEND ? (a0 > a1) : (a0 < a1);
      2'b01:   swap = ASCEND;     // lone packet on input 0
      2'b10:   swap = !ASCEND;    // lone packet on input 1
      default: swap = swap_q;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) swap_q <= 1'b0;
    else     swap_q <= swap;
  end

  assign sf_out[0]   = swap ? sf_in[1]   : sf_in[0];
  assign sf_out[1]   = swap ? sf_in[0]   : sf_in[1];
  assign data_out[0] = swap ? data_in[1] : data_in[0];
  assign data_out[1] = swap ? data_in[0] : data_in[1];

endmodule
