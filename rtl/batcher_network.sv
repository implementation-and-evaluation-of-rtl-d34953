// batcher_network: Batcher bitonic sorting network built from batcher_node.
//
// For N = 2^n inputs the network has n merge stages; merge stage s
// (s = 1..n) sorts blocks of 2^s lines and has s columns of N/2 nodes that
// compare lines 2^(s-1), ..., 2, 1 apart, N/2 * n(n+1)/2 nodes in all
// (28 columns for N = 128). A node whose upper line lies in an even block
// of 2^s lines sorts ascending, one in an odd block descending, so each stage
// merges pairs of oppositely sorted sequences; the last stage is all
// ascending. Packets that start in the same cycle leave sorted by destination
// address, packed onto the highest-numbered lines, idle lines on top.
// The network is combinational for the header; each node holds its setting
// for the body of the packet, so all packets must start in the same cycle.
module batcher_network #(
  parameter int unsigned N      = 128,
  parameter int unsigned PHIT_W = 8,
  localparam int unsigned AW   = $clog2(N),
  localparam int unsigned NCOL = AW * (AW + 1) / 2
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [N-1:0]             sf_in,
  input  logic [N-1:0][PHIT_W-1:0] data_in,
  output logic [N-1:0]             sf_out,
  output logic [N-1:0][PHIT_W-1:0] data_out
);

  // merge stage s (1-based) and column t within it for network column c
  function automatic int unsigned col_stage(int unsigned c);
    int unsigned st = 1;
    while (c >= st) begin
      c -= st;
      st++;
    end
    return st;
  endfunction

  function automatic int unsigned col_index(int unsigned c);
    int unsigned st = 1;
    while (c >= st) begin
      c -= st;
      st++;
    end
    return c;
  endfunction

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    localparam int unsigned S    = col_stage(c);
    localparam int unsigned DIST = 1 << (S - 1 - col_index(c));
    logic [N-1:0]             sf_i, sf_o;
    logic [N-1:0][PHIT_W-1:0] d_i, d_o;
    if (c == 0) begin : g_first
      assign sf_i = sf_in;
      assign d_i  = data_in;
    end else begin : g_next
      assign sf_i = g_col[c-1].sf_o;
      assign d_i  = g_col[c-1].d_o;
    end
    for (genvar p = 0; p < N / 2; p++) begin : g_node
      localparam int unsigned I = (p / DIST) * 2 * DIST + (p % DIST);
      localparam int unsigned L = I + DIST;
      localparam bit ASC = ((I >> S) & 1) == 0;
      batcher_node #(.PHIT_W(PHIT_W), .AW(AW), .ASCEND(ASC)) u_node (
        .clk, .rst,
        .sf_in   ({sf_i[L], sf_i[I]}),
        .data_in ({d_i[L],  d_i[I]}),
        .sf_out  ({sf_o[L], sf_o[I]}),
        .data_out({d_o[L],  d_o[I]})
      );
    end
  end

  assign sf_out   = g_col[NCOL-1].sf_o;
  assign data_out = g_col[NCOL-1].d_o;

endmodule
