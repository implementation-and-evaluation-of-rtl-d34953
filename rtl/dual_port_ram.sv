// dual_port_ram: the packet buffer of an input unit.
//
// A synchronous two-port memory built from an array of registers: one write
// port (wr_en, wr_addr, data_in) and one read port (rd_en, rd_addr, data_out),
// both acting on the rising clock edge, so that an arriving packet can be
// stored while another one is read out. The address is {block, phit index}:
// the memory is split into banks of PKT_PHITS words, one packet per bank.
//
// Timing: a write takes effect at the clock edge; read data appear on
// data_out one cycle after rd_en/rd_addr (registered output). Reading an
// address in the cycle it is written returns the old word.
// The contents are not reset; the controllers never read a word they have
// not written. A vendor two-port RAM macro with the same ports can replace it.
module dual_port_ram #(
  parameter int unsigned DEPTH = 4096,   // words: blocks * phits per packet
  parameter int unsigned WIDTH = 8,      // one phit
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] data_in,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] data_out
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= data_in;
    if (rd_en) data_out <= mem[rd_addr];
  end

endmodule
