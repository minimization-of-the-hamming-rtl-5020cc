// check_predictor: the duplicate circuit reduced to its check bits.
//
// Instead of duplicating the original circuit and feeding the copy's outputs
// through an XOR tree, the check bits are treated as the only outputs of one
// new two-level function of the primary inputs. Its truth table is worked
// out here at elaboration time: for every input value a, the stored word is
// the code's check bits of the original circuit's output word TABLE[a]. The
// original outputs are not kept, so synthesis minimises a circuit with K
// outputs instead of NO outputs plus a K-output XOR tree. The table is held
// as a LUT, which a synthesis tool maps and minimises like any truth table.
//
// Reducing the duplicate to its check bits is the paper's method; computing
// the table at elaboration (instead of with external tools) and leaving the
// two-level minimisation to the synthesis tool are this design's choices.
// Parameters are the original circuit's NI, NO and TABLE (same layout as in
// comb_circuit), the code (CODE) and the check-bit polarity (ODD).
// Fault model: as in comb_circuit, seu_en/seu_addr/seu_mask flip bits of the
// LUT word at one address; this port is for fault injection only.
// Timing: purely combinational.
module check_predictor
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
  // single-event upset injection
  input  logic          seu_en,
  input  logic [NI-1:0] seu_addr,
  input  logic [K-1:0]  seu_mask
);

  // Check-bit truth table: word a at [a*K +: K].
  function automatic logic [(2**NI)*K-1:0] build_check_table();
    logic [(2**NI)*K-1:0] t;
    logic [NO-1:0]        word;
    logic                 p;
    t = '0;
    for (int unsigned a = 0; a < 2**NI; a++) begin
      word = TABLE[a*NO +: NO];
      for (int unsigned k = 0; k < K; k++) begin
        p = ODD;
        for (int unsigned i = 0; i < NO; i++) p = p ^ (coef(i, k, K) & word[i]);
        t[a*K + k] = p;
      end
    end
    return t;
  endfunction

  localparam logic [(2**NI)*K-1:0] CHECK_TABLE = build_check_table();

  logic [K-1:0] lut_word;

  always_comb begin
    lut_word = CHECK_TABLE[in*K +: K];
    if (seu_en && (seu_addr == in)) lut_word = lut_word ^ seu_mask;
    check = lut_word;
  end

endmodule
