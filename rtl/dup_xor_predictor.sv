// dup_xor_predictor: check-bit prediction by a full duplicate of the
// original circuit followed by an XOR-tree code generator.
//
// This is the conventional way of predicting the check bits: the duplicate
// computes all NO outputs again and code_generator folds them into the K
// check bits. It serves as the alternative to check_predictor, which merges
// both steps into one smaller function; both produce the same check bits.
//
// The paper compares against this structure; it is kept as an option.
// Parameters as in check_predictor. The upset port flips bits of the
// duplicate's LUT word at seu_addr (NO bits wide, since the duplicate stores
// all outputs). Timing: purely combinational.
module dup_xor_predictor
  import tsc_pkg::*;
#(
  parameter int unsigned           NI    = 3,
  parameter int unsigned           NO    = 2,
  parameter logic [(2**NI)*NO-1:0] TABLE = 16'h3A56,
  parameter code_e                 CODE  = CODE_HAMMING,
  parameter logic                  ODD   = 1'b0,
  localparam int unsigned          K     = num_check_bits(NO, CODE)
) (
  input  logic [NI-1:0] in,
  output logic [K-1:0]  check,
  // single-event upset injection into the duplicate
  input  logic          seu_en,
  input  logic [NI-1:0] seu_addr,
  input  logic [NO-1:0] seu_mask
);

  logic [NO-1:0] dup_out;

  comb_circuit #(.NI(NI), .NO(NO), .TABLE(TABLE)) u_duplicate (
    .in      (in),
    .out     (dup_out),
    .seu_en  (seu_en),
    .seu_addr(seu_addr),
    .seu_mask(seu_mask)
  );

  code_generator #(.NO(NO), .CODE(CODE), .ODD(ODD)) u_codegen (
    .o(dup_out),
    .x(check)
  );

endmodule
