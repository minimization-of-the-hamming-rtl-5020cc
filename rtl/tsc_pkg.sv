// tsc_pkg: shared types and elaboration-time functions of the self-checking
// circuit.
//
// The check bits follow x_k = a_1k o_1 ^ a_2k o_2 ^ ... ^ a_mk o_m over the
// primary outputs o_1..o_m. The coefficient matrix a (m rows, K columns) is
// the right-hand sub-matrix of a systematic Hamming generator matrix, filled
// so that a faulty output can be located by binary search:
//   * the last column (k = K-1) is all ones: overall parity of the outputs;
//   * column k < K-1 holds a one in row i (0-based) when bit k of i is zero,
//     so column 0 is 1,0,1,0,..., column 1 is 1,1,0,0,... and so on.
// With m = 8 and K = 4 this gives the rows 1111, 0111, 1011, 0011, 1101,
// 0101, 1001, 0001 (bit order x1..x4). The number of check bits is
// clog2(m) + 1 for the Hamming code and 1 for single parity. Each check bit can
// be inverted (odd parity) with the ODD parameter of the modules.
// The matrix layout and the check-bit count are the ones the paper uses; the
// packed bit order of tables and vectors is this design's own.
package tsc_pkg;

  // Error-detecting code used for the check bits.
  typedef enum logic [0:0] {
    CODE_HAMMING = 1'b0,  // clog2(m)+1 check bits, binary-search matrix
    CODE_PARITY  = 1'b1   // one check bit, parity over all outputs
  } code_e;

  // How the check bits are predicted from the primary inputs.
  typedef enum logic [0:0] {
    PRED_MERGED  = 1'b0,  // duplicate reduced to its check bits (two-level)
    PRED_DUP_XOR = 1'b1   // full duplicate followed by an XOR tree
  } pred_e;

  // Which LUT a single-event upset is injected into.
  typedef enum logic [0:0] {
    SEU_FUNC = 1'b0,  // LUT of the original circuit
    SEU_PRED = 1'b1   // LUT of the check-bit predictor
  } seu_target_e;

  // Largest number of outputs handled by the elaboration-time functions.
  localparam int unsigned MAX_OUT = 256;

  // Number of check bits for m outputs.
  function automatic int unsigned num_check_bits(int unsigned m, code_e code);
    if (code == CODE_PARITY) return 1;
    return $clog2(m) + 1;
  endfunction

  // Coefficient a(i,k) of the code matrix, 0-based row i and column k.
  function automatic logic coef(int unsigned i, int unsigned k, int unsigned nchk);
    if (k == nchk - 1) return 1'b1;
    return ~i[k];
  endfunction

  // Column k of the code matrix as an m-bit mask (bit i = a(i,k)).
  function automatic logic [MAX_OUT-1:0] column_mask(int unsigned k, int unsigned m,
                                                     int unsigned nchk);
    logic [MAX_OUT-1:0] mask;
    mask = '0;
    for (int unsigned i = 0; i < m; i++) mask[i] = coef(i, k, nchk);
    return mask;
  endfunction

endpackage
