// crossbar: N x N crossbar switching core.
//
// Each input drives a horizontal bus of W bits (here the phit plus its
// start-of-frame bit). Crosspoint (i, j) is a row of W two-input AND gates
// that pass input bus i when its single control bit ctrl[i][j] is 1; the
// W-bit OR of all crosspoints of column j forms output bus j. The core is
// purely combinational; the arbiter that drives ctrl must keep at most one
// crosspoint per output column on, which an assertion checks.
module crossbar #(
  parameter int unsigned N = 128,
  parameter int unsigned W = 9
) (
  input  logic [N-1:0][W-1:0] in_bus,
  input  logic [N-1:0][N-1:0] ctrl,     // ctrl[i][j]: connect input i to output j
  output logic [N-1:0][W-1:0] out_bus
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      out_bus[j] = '0;
      for (int i = 0; i < N; i++)
        out_bus[j] = out_bus[j] | (in_bus[i] & {W{ctrl[i][j]}});
    end
  end

  always_comb begin
    for (int j = 0; j < N; j++) begin
      logic [N-1:0] col;
      for (int i = 0; i < N; i++) col[i] = ctrl[i][j];
      a_one_per_output: assert ($onehot0(col)) else $error("crossbar: output %0d driven twice", j);
    end
  end

endmodule
