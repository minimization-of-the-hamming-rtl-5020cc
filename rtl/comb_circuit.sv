// comb_circuit: the original combinational circuit of the self-checking
// structure, realised the way an FPGA realises it: as a look-up table.
//
// The function is given as a truth table parameter TABLE. Entry a (the
// NO-bit output word for input value a) sits at TABLE[a*NO +: NO]; the input
// value is used directly as the LUT address, so output o_(j+1) is out[j].
// The default table is the three-input, two-output example circuit with
// inputs {c,b,a} (c is in[2]) and outputs out[0] = f, out[1] = e:
//   cba : 000 001 010 011 100 101 110 111
//   f   :  0   1   1   1   0   0   1   0
//   e   :  1   0   0   0   1   1   1   0
// i.e. f = a'b + c'(a+b) and e = a'b' + c(a'+b').
//
// Fault model: a single-event upset changes the content of one LUT lut_word.
// When seu_en is set, the word stored at address seu_addr is XORed with
// seu_mask; the wrong value only reaches the output while that address is
// selected, so a flipped lut_word is masked for every other input. The upset
// port exists for fault injection and is this design's own addition; tie
// seu_en low in normal use.
//
// Holding the function as a LUT follows the paper's view of an FPGA circuit
// as look-up tables; the table layout is this design's own.
// Timing: purely combinational, no clock.
module comb_circuit #(
  parameter int unsigned           NI    = 3,
  parameter int unsigned           NO    = 2,
  parameter logic [(2**NI)*NO-1:0] TABLE = 16'h3A56
) (
  input  logic [NI-1:0] in,
  output logic [NO-1:0] out,
  // single-event upset injection
  input  logic          seu_en,
  input  logic [NI-1:0] seu_addr,
  input  logic [NO-1:0] seu_mask
);

  logic [NO-1:0] lut_word;

  always_comb begin
    lut_word = TABLE[in*NO +: NO];
    if (seu_en && (seu_addr == in)) lut_word = lut_word ^ seu_mask;
    out = lut_word;
  end

endmodule
