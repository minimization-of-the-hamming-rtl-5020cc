// code_generator: XOR-tree check-bit generator.
//
// Computes check bit x_k = a_1k o_1 ^ a_2k o_2 ^ ... ^ a_mk o_m for every
// column k of the code matrix defined in tsc_pkg (o_(i+1) is o[i], x_(k+1)
// is x[k]). With CODE_HAMMING there are clog2(NO)+1 check bits: x[K-1] is
// the parity of all outputs and the lower ones split the outputs in halves,
// quarters, ... so that a single wrong output can be located. With
// CODE_PARITY there is one check bit, the parity of all outputs. ODD set to 1
// inverts every check bit (odd parity), 0 keeps even parity.
//
// The equation, the matrix and the check-bit count follow the paper; the
// default NO = 8 is its 8-output example. The ODD option is added so that
// the paper's odd-parity example can be built too.
// Interface: o (NO primary outputs) in, x (K check bits) out.
// Timing: purely combinational, one XOR tree per check bit.
module code_generator
  import tsc_pkg::*;
#(
  parameter int unsigned NO   = 8,
  parameter code_e       CODE = CODE_HAMMING,
  parameter logic        ODD  = 1'b0,
  localparam int unsigned K   = num_check_bits(NO, CODE)
) (
  input  logic [NO-1:0] o,
  output logic [K-1:0]  x
);

  for (genvar k = 0; k < K; k++) begin : g_chk
    localparam logic [MAX_OUT-1:0] COL = column_mask(k, NO, K);
    assign x[k] = ^(o & COL[NO-1:0]) ^ ODD;
  end

endmodule
