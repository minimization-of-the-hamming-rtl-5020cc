// tsc_workload_run: drives one tsc_top configuration through a fixed test
// and reports its counts; instantiated once per workload by tb_tsc_workloads.
//
// Given a circuit (NI, NO, TABLE), a code and a predictor, it checks that
// the number of check bits is EXP_K, then applies NVEC input vectors
// (exhaustive when 2**NI <= NVEC, random otherwise). For each vector:
//   * fault free: outputs equal TABLE, no error, syndrome 0;
//   * one random single-bit upset at that address, in the circuit and then in
//     the predictor: error raised; for the circuit under the Hamming code,
//     the syndrome locates the flipped output;
//   * the same upset at another address: masked, no error.
// The reference encoder groups outputs by the bits of their index and is
// written independently of the design's package; ODD inverts all check bits.
module tsc_workload_run
  import tsc_pkg::*;
#(
  parameter string                 NAME  = "w",
  parameter int unsigned           NI    = 3,
  parameter int unsigned           NO    = 2,
  parameter logic [(2**NI)*NO-1:0] TABLE = '0,
  parameter code_e                 CODE  = CODE_HAMMING,
  parameter pred_e                 PRED  = PRED_MERGED,
  parameter int unsigned           EXP_K = 2,
  parameter int unsigned           NVEC  = 256,
  parameter logic                  ODD   = 1'b0
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   detected,
  output int   masked
);

  localparam int unsigned K = num_check_bits(NO, CODE);

  logic [NI-1:0] in;
  logic [NO-1:0] out;
  logic [K-1:0]  check, syndrome;
  logic [1:0]    z;
  logic          error;
  logic          seu_en;
  seu_target_e   seu_target;
  logic [NI-1:0] seu_addr;
  logic [NO-1:0] seu_mask;

  tsc_top #(.NI(NI), .NO(NO), .TABLE(TABLE), .CODE(CODE), .PRED(PRED), .ODD(ODD)) dut (.*);

  function automatic logic [K-1:0] ref_enc(logic [NO-1:0] o);
    logic [K-1:0] x = {K{ODD}};
    for (int i = 0; i < NO; i++) if (o[i]) begin
      x[K-1] = ~x[K-1];
      for (int b = 0; b < K - 1; b++) if (((i >> b) & 1) == 0) x[b] = ~x[b];
    end
    return x;
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %s", NAME, what);
    end
  endtask

  initial begin
    logic [NI-1:0] v, other;
    int unsigned   j, loc;
    done = 1'b0; checks = 0; failures = 0; detected = 0; masked = 0;
    seu_en = 1'b0; seu_target = SEU_FUNC; seu_addr = '0; seu_mask = '0; in = '0;
    chk(K == EXP_K, $sformatf("check bits %0d, expected %0d", K, EXP_K));
    for (int unsigned n = 0; n < NVEC; n++) begin
      v = (2**NI <= NVEC) ? NI'(n) : NI'($urandom);
      other = v ^ NI'(1 + ($urandom % (2**NI - 1)));
      in = v;
      seu_en = 1'b0;
      #1;
      chk(out === TABLE[v*NO +: NO], $sformatf("outputs in=%0h", v));
      chk(check === ref_enc(out), $sformatf("check bits in=%0h", v));
      chk(!error && syndrome == '0, $sformatf("false alarm in=%0h", v));
      // upset in the original circuit
      j = $urandom % NO;
      seu_en = 1'b1; seu_target = SEU_FUNC; seu_mask = NO'(1) << j; seu_addr = v;
      #1;
      chk(error, $sformatf("circuit upset at in=%0h bit %0d missed", v, j));
      if (error) detected++;
      if (CODE == CODE_HAMMING) begin
        loc = 0;
        for (int b = 0; b < K - 1; b++) if (!syndrome[b]) loc |= 1 << b;
        chk(syndrome[K-1] && loc == j,
            $sformatf("location of output %0d, syndrome %b", j, syndrome));
      end
      seu_addr = other;
      #1;
      chk(!error, $sformatf("circuit upset elsewhere not masked in=%0h", v));
      if (!error) masked++;
      // upset in the predictor
      j = $urandom % K;
      seu_target = SEU_PRED; seu_mask = NO'(1) << j; seu_addr = v;
      #1;
      chk(error, $sformatf("predictor upset at in=%0h bit %0d missed", v, j));
      if (error) detected++;
      seu_addr = other;
      #1;
      chk(!error, $sformatf("predictor upset elsewhere not masked in=%0h", v));
      if (!error) masked++;
    end
    seu_en = 1'b0;
    $display("workload %-14s NI=%0d NO=%0d K=%0d: %0d checks, %0d failures, %0d upsets detected, %0d masked",
             NAME, NI, NO, K, checks, failures, detected, masked);
    done = 1'b1;
  end

endmodule
