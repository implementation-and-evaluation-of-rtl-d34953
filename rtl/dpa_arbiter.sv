// dpa_arbiter: Diagonal Propagation Arbiter for the N x N requests of the
// virtual output queues.
//
// req[i][j] is the request of input i's queue for output j; grant[i][j] is
// its grant. At most one grant is issued per input (row) and per output
// (column), and only to requests.
//
// Structure: the N*N arbitration cells are grouped into N diagonals of N
// mutually independent cells, diagonal d holding cells (i, (d - i) mod N);
// no two cells of a diagonal share a row or a column. The diagonals are laid
// out twice, one under the other, giving 2N-1 cell rows (the last copy of
// diagonal N-1 is not needed). Each cell is the basic ripple arbitration
// cell: it grants when its (masked) request is high and neither the north
// signal (a grant earlier in its column) nor the west signal (a grant earlier
// in its row) is asserted, and it asserts south/east when it grants or when
// they were asserted at its north/west. A (2N-1)-bit priority vector P, with
// N consecutive ones, masks the requests so that exactly one copy of every
// cell is active; the topmost active diagonal has the highest priority and
// the priority falls diagonal by diagonal.
//
// P starts as N ones followed by N-1 zeros and, on every cycle with `arb`
// high, moves the window one diagonal down; after the window reaches the
// bottom it starts again at the top (a loadable circular shift register),
// which rotates the priority round-robin. The grant logic itself is
// combinational (N diagonal steps of cell delay); only P is stored.
module dpa_arbiter #(
  parameter int unsigned N = 128,
  localparam int unsigned ROWS = 2 * N - 1,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0][N-1:0] req,
  input  logic                arb,     // an arbitration takes place this cycle
  output logic [N-1:0][N-1:0] grant
);

  localparam logic [ROWS-1:0] PRIO_INIT = {{(N - 1){1'b0}}, {N{1'b1}}};

  logic [ROWS-1:0] prio;  // bit r = cell row r active

  always_ff @(posedge clk) begin
    if (rst)              prio <= PRIO_INIT;
    else if (arb) begin
      if (prio[ROWS-1])   prio <= PRIO_INIT;
      else                prio <= prio << 1;
    end
  end

  // One arbitration cell: grant, south and east outputs.
  function automatic logic [2:0] arb_cell(input logic r, input logic mask,
                                          input logic north, input logic west);
    logic g;
    g = r && mask && !north && !west;
    return {g, north || g, west || g};
  endfunction

  always_comb begin
    logic [N-1:0] col_sig;  // south signal running down each column
    logic [N-1:0] row_sig;  // east signal running along each row
    logic [2:0]   c;
    logic [AW-1:0] j;
    for (int i = 0; i < N; i++) grant[i] = '0;
    col_sig = '0;
    row_sig = '0;
    for (int r = 0; r < ROWS; r++) begin
      for (int i = 0; i < N; i++) begin
        j = AW'((r + N - i) % N);
        c = arb_cell(req[i][j], prio[r], col_sig[j], row_sig[i]);
        grant[i][j] = grant[i][j] | c[2];
        col_sig[j]  = c[1];
        row_sig[i]  = c[0];
      end
    end
  end

  a_prio_window: assert property (@(posedge clk) disable iff (rst) $countones(prio) == N)
    else $error("dpa_arbiter: priority window lost");

endmodule
