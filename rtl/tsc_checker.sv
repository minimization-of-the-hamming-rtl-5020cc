// tsc_checker: checker of the self-checking circuit.
//
// It receives the code word, i.e. the NO primary outputs of the original
// circuit and the K predicted check bits, regenerates the check bits from the
// outputs with code_generator and compares both sets. The comparison is a
// two-rail checker tree: check bit k forms the pair (gen[k], ~check[k]),
// which is complementary exactly when the two agree, and two_rail_reduce
// folds all pairs into one pair z. The result has two outputs, as a
// self-checking checker needs: z = 01 or 10 means a valid code word, z = 00
// or 11 means an error (in the circuit or in the checker itself).
//
// syndrome = gen ^ check is also brought out. For a single wrong output
// o_(i+1) under the Hamming code it equals row i of the code matrix, so
// syndrome[K-1] is set and ~syndrome[K-2:0] is the index i of the wrong
// output (the binary-search location the code matrix is built for).
//
// The paper gives only the checker's job and its two outputs; the two-rail
// tree and the syndrome port are this design's choices.
// Timing: purely combinational.
module tsc_checker
  import tsc_pkg::*;
#(
  parameter int unsigned  NO   = 2,
  parameter code_e        CODE = CODE_HAMMING,
  parameter logic         ODD  = 1'b0,
  localparam int unsigned K    = num_check_bits(NO, CODE)
) (
  input  logic [NO-1:0] out,
  input  logic [K-1:0]  check,
  output logic [1:0]    z,
  output logic [K-1:0]  syndrome
);

  logic [K-1:0] gen;

  code_generator #(.NO(NO), .CODE(CODE), .ODD(ODD)) u_codegen (
    .o(out),
    .x(gen)
  );

  two_rail_reduce #(.N(K)) u_tree (
    .rail0(gen),
    .rail1(~check),
    .z    (z)
  );

  assign syndrome = gen ^ check;

endmodule
