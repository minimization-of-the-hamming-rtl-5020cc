// two_rail_reduce: balanced tree of two-rail checker cells.
//
// N input pairs (rail0[i], rail1[i]) are folded into one output pair z.
// A cell takes pairs (a0,a1) and (b0,b1) and gives
//   z0 = a0 b0 | a1 b1,  z1 = a0 b1 | a1 b0,
// which is complementary if and only if both input pairs are complementary
// (for any single non-complementary pair). The tree uses heap numbering:
// leaves are nodes N..2N-1, node j combines nodes 2j and 2j+1, node 1 is
// the output; N = 1 passes the single pair straight through.
// This is the textbook two-rail checker, not taken from the paper.
// Timing: purely combinational, depth ceil(log2 N) cells.
module two_rail_reduce #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] rail0,
  input  logic [N-1:0] rail1,
  output logic [1:0]   z        // z[0] from rail 0, z[1] from rail 1
);

  logic [2*N-1:1] n0, n1;

  always_comb begin
    n0 = '0;
    n1 = '0;
    for (int unsigned i = 0; i < N; i++) begin
      n0[N+i] = rail0[i];
      n1[N+i] = rail1[i];
    end
    for (int unsigned j = N - 1; j >= 1; j--) begin
      n0[j] = (n0[2*j] & n0[2*j+1]) | (n1[2*j] & n1[2*j+1]);
      n1[j] = (n0[2*j] & n1[2*j+1]) | (n1[2*j] & n0[2*j+1]);
    end
    z = {n1[1], n0[1]};
  end

endmodule
