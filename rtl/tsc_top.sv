// tsc_top: totally self-checking (TSC) combinational circuit.
//
// Four parts make up the circuit: the original combinational circuit, a
// predictor that computes the check bits of its outputs directly from the
// primary inputs, and a checker. The NO primary outputs together with the K
// check bits form the code word; the checker regenerates the check bits from
// the outputs and compares. Any single upset of a LUT cell, in the original
// circuit or in the predictor, turns the code word into a non-code word while
// the faulty cell is addressed, and the checker's two-rail pair z leaves the
// complementary state.
//
// PRED selects the predictor: PRED_MERGED (default) uses check_predictor, the
// duplicate reduced to a K-output two-level function; PRED_DUP_XOR uses a full
// duplicate plus an XOR tree. CODE selects the Hamming code (default,
// clog2(NO)+1 check bits) or a single parity bit; ODD inverts the check bits.
// NI, NO and TABLE describe the original circuit (see comb_circuit); the
// defaults are the three-input, two-output example with Hamming check bits.
//
// The four-part structure, the merged predictor and the codes follow the
// paper; the checker's insides and the upset-injection ports are this
// design's own.
// Ports: in -> out and check (the code word), z (two-rail checker output,
// 01/10 = valid), error (z[0] == z[1], a single-rail summary for convenience,
// itself not self-checking), syndrome (see tsc_checker). The seu_* inputs
// inject one LUT upset into the circuit chosen by seu_target, for testing;
// tie seu_en low in use. For the predictor only seu_mask[K-1:0] is used
// (K <= NO always holds). Timing: purely combinational.
module tsc_top
  import tsc_pkg::*;
#(
  parameter int unsigned           NI    = 3,
  parameter int unsigned           NO    = 2,
  parameter logic [(2**NI)*NO-1:0] TABLE = 16'h3A56,
  parameter code_e                 CODE  = CODE_HAMMING,
  parameter pred_e                 PRED  = PRED_MERGED,
  parameter logic                  ODD   = 1'b0,
  localparam int unsigned          K     = num_check_bits(NO, CODE)
) (
  input  logic        [NI-1:0] in,
  output logic        [NO-1:0] out,
  output logic        [K-1:0]  check,
  output logic        [1:0]    z,
  output logic                 error,
  output logic        [K-1:0]  syndrome,
  // single-event upset injection
  input  logic                 seu_en,
  input  seu_target_e          seu_target,
  input  logic        [NI-1:0] seu_addr,
  input  logic        [NO-1:0] seu_mask
);

  if (NO > MAX_OUT) begin : g_size_check
    $error("tsc_top: NO exceeds tsc_pkg::MAX_OUT");
  end

  logic seu_func, seu_pred;
  assign seu_func = seu_en && (seu_target == SEU_FUNC);
  assign seu_pred = seu_en && (seu_target == SEU_PRED);

  comb_circuit #(.NI(NI), .NO(NO), .TABLE(TABLE)) u_circuit (
    .in      (in),
    .out     (out),
    .seu_en  (seu_func),
    .seu_addr(seu_addr),
    .seu_mask(seu_mask)
  );

  if (PRED == PRED_MERGED) begin : g_merged
    check_predictor #(
      .NI(NI), .NO(NO), .TABLE(TABLE), .CODE(CODE), .ODD(ODD)
    ) u_predictor (
      .in      (in),
      .check   (check),
      .seu_en  (seu_pred),
      .seu_addr(seu_addr),
      .seu_mask(seu_mask[K-1:0])
    );
  end else begin : g_dup_xor
    dup_xor_predictor #(
      .NI(NI), .NO(NO), .TABLE(TABLE), .CODE(CODE), .ODD(ODD)
    ) u_predictor (
      .in      (in),
      .check   (check),
      .seu_en  (seu_pred),
      .seu_addr(seu_addr),
      .seu_mask(seu_mask)
    );
  end

  tsc_checker #(.NO(NO), .CODE(CODE), .ODD(ODD)) u_checker (
    .out     (out),
    .check   (check),
    .z       (z),
    .syndrome(syndrome)
  );

  assign error = (z[0] == z[1]);

endmodule
