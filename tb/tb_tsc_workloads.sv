// tb_tsc_workloads: the self-checking circuit on the benchmark shapes of the
// evaluation.
//
// The three-input example circuit is run with a single odd-parity bit
// through both predictors and with the Hamming code through the duplicate.
// c17 is built from its well-known six-NAND netlist (inputs N1, N2, N3, N6,
// N7 on in[0..4], outputs N22 on out[0] and N23 on out[1]) and run
// exhaustively with the Hamming code and with single parity, through both
// predictors. The other benchmarks' functions are not available here, so
// each is replaced by a pseudo-random truth table with the benchmark's
// number of inputs and outputs; the run checks that the code needs the
// number of check bits listed for it (Hamming: 4 for 8 outputs, 5 for 12,
// 6 for 31; parity: 1) and that upsets are detected and masked as
// they should be. al2 (16 inputs, 47 outputs) is left out: elaborating its
// 3-Mbit truth table takes the simulator's compiler far too long.
module tb_tsc_workloads;
  import tsc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  // c17 truth table: 5 inputs, 2 outputs.
  function automatic logic [32*2-1:0] c17_table();
    logic [32*2-1:0] t;
    logic n1, n2, n3, n6, n7, n10, n11, n16, n19;
    for (int v = 0; v < 32; v++) begin
      {n7, n6, n3, n2, n1} = 5'(v);
      n10 = ~(n1 & n3);
      n11 = ~(n3 & n6);
      n16 = ~(n2 & n11);
      n19 = ~(n11 & n7);
      t[v*2]   = ~(n10 & n16);
      t[v*2+1] = ~(n16 & n19);
    end
    return t;
  endfunction

  // Pseudo-random truth table with ni inputs and no outputs (no <= 64).
  function automatic logic [63:0] rnd_word(int unsigned v, int unsigned seed);
    logic [63:0] h;
    h = {32'(v) * 32'h9E37_79B1 ^ 32'(seed), 32'(v) * 32'h85EB_CA6B + 32'(seed)};
    h ^= h >> 29; h *= 64'hBF58_476D_1CE4_E5B9;
    h ^= h >> 32; h *= 64'h94D0_49BB_1331_11EB;
    h ^= h >> 29;
    return h;
  endfunction

`define RND_TABLE(FN, NI_, NO_, SEED_)                                        \
  function automatic logic [(2**NI_)*NO_-1:0] FN();                           \
    logic [(2**NI_)*NO_-1:0] t;                                               \
    for (int unsigned v = 0; v < 2**NI_; v++)                                 \
      t[v*NO_ +: NO_] = NO_'(rnd_word(v, SEED_));                             \
    return t;                                                                 \
  endfunction

  `RND_TABLE(alu1_table, 12,  8, 1)
  `RND_TABLE(apla_table, 10, 12, 2)
  `RND_TABLE(b11_table,   8, 31, 3)
  `RND_TABLE(br1_table,  12,  8, 4)
  `RND_TABLE(alu2_table, 10,  8, 6)
  `RND_TABLE(alu3_table, 10,  8, 7)

  localparam int NW = 19;
  logic [NW-1:0] done;
  int chk [NW], fail [NW], det [NW], msk [NW];

`define RUN(IDX, NAME_, NI_, NO_, TBL, CODE_, PRED_, K_, NV, ODD_ = 1'b0)    \
  tsc_workload_run #(.NAME(NAME_), .NI(NI_), .NO(NO_), .TABLE(TBL),          \
                     .CODE(CODE_), .PRED(PRED_), .EXP_K(K_), .NVEC(NV),      \
                     .ODD(ODD_))                                              \
    u_run``IDX (.done(done[IDX]), .checks(chk[IDX]), .failures(fail[IDX]),   \
                .detected(det[IDX]), .masked(msk[IDX]));

  `RUN(0,  "c17/ham/pla",  5,  2, c17_table(),  CODE_HAMMING, PRED_MERGED,  2, 32)
  `RUN(1,  "c17/ham/xor",  5,  2, c17_table(),  CODE_HAMMING, PRED_DUP_XOR, 2, 32)
  `RUN(2,  "c17/par/pla",  5,  2, c17_table(),  CODE_PARITY,  PRED_MERGED,  1, 32)
  `RUN(3,  "c17/par/xor",  5,  2, c17_table(),  CODE_PARITY,  PRED_DUP_XOR, 1, 32)
  `RUN(4,  "alu1/ham/pla", 12, 8, alu1_table(), CODE_HAMMING, PRED_MERGED,  4, 512)
  `RUN(5,  "alu1/par/xor", 12, 8, alu1_table(), CODE_PARITY,  PRED_DUP_XOR, 1, 512)
  `RUN(6,  "apla/ham/pla", 10, 12, apla_table(), CODE_HAMMING, PRED_MERGED, 5, 512)
  `RUN(7,  "apla/par/xor", 10, 12, apla_table(), CODE_PARITY, PRED_DUP_XOR, 1, 512)
  `RUN(8,  "b11/ham/pla",  8, 31, b11_table(),  CODE_HAMMING, PRED_MERGED,  6, 256)
  `RUN(9,  "b11/par/xor",  8, 31, b11_table(),  CODE_PARITY,  PRED_DUP_XOR, 1, 256)
  `RUN(10, "br1/ham/pla",  12, 8, br1_table(),  CODE_HAMMING, PRED_MERGED,  4, 512)
  `RUN(11, "br1/par/xor",  12, 8, br1_table(),  CODE_PARITY,  PRED_DUP_XOR, 1, 512)
  `RUN(12, "alu2/ham/pla", 10, 8, alu2_table(), CODE_HAMMING, PRED_MERGED,  4, 512)
  `RUN(13, "alu2/par/xor", 10, 8, alu2_table(), CODE_PARITY,  PRED_DUP_XOR, 1, 512)
  `RUN(14, "alu3/ham/pla", 10, 8, alu3_table(), CODE_HAMMING, PRED_MERGED,  4, 512)
  `RUN(15, "alu3/par/xor", 10, 8, alu3_table(), CODE_PARITY,  PRED_DUP_XOR, 1, 512)
  // three-input example with its single odd-parity bit, and with Hamming
  `RUN(16, "ex/odd/pla",   3, 2, 16'h3A56, CODE_PARITY,  PRED_MERGED,  1, 8, 1'b1)
  `RUN(17, "ex/odd/xor",   3, 2, 16'h3A56, CODE_PARITY,  PRED_DUP_XOR, 1, 8, 1'b1)
  `RUN(18, "ex/ham/xor",   3, 2, 16'h3A56, CODE_HAMMING, PRED_DUP_XOR, 2, 8)

  initial begin
    int checks, failures;
    checks = 0;
    failures = 0;
    wait (&done);
    for (int i = 0; i < NW; i++) begin
      checks += chk[i] + 2;
      failures += fail[i];
      if (det[i] == 0) begin failures++; $display("FAIL workload %0d: no upset detected", i); end
      if (msk[i] == 0) begin failures++; $display("FAIL workload %0d: no upset masked", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
