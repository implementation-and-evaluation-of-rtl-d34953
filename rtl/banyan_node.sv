// banyan_node: 2x2 self-routing switching element of the Banyan network.
//
// Two multiplexers route the two input channels (start-of-frame bit plus
// phit) either straight (in0->out0, in1->out1) or crossed. A small
// controller looks at the start-of-frame inputs: when a packet starts on
// input 0 it is sent to output <destination bit STAGE_BIT of its phit 0>;
// otherwise, when a packet starts on input 1, that packet is sent to output
// <its bit>. When both start, checking input 0 is enough, because in a
// non-blocking pattern the two bits differ. The chosen setting applies in
// the start cycle itself (the header passes through combinationally) and is
// held in a register for the rest of the packet, until the next start.
module banyan_node #(
  parameter int unsigned PHIT_W    = 8,
  parameter int unsigned STAGE_BIT = 0   // destination bit examined by this stage
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [1:0]             sf_in,
  input  logic [1:0][PHIT_W-1:0] data_in,
  output logic [1:0]             sf_out,
  output logic [1:0][PHIT_W-1:0] data_out
);

  logic crossed, crossed_q;

  always_comb begin
    if (sf_in[0])      crossed = data_in[0][STAGE_BIT];
    else if (sf_in[1]) crossed = !data_in[1][STAGE_BIT];
    else               crossed = crossed_q;
  end

  always_ff @(posedge clk) begin
    if (rst) crossed_q <= 1'b0;
    else     crossed_q <= crossed;
  end

  assign sf_out[0]   = crossed ? sf_in[1]   : sf_in[0];
  assign sf_out[1]   = crossed ? sf_in[0]   : sf_in[1];
  assign data_out[0] = crossed ? data_in[1] : data_in[0];
  assign data_out[1] = crossed ? data_in[0] : data_in[1];

endmodule
