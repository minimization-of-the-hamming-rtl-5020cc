// tb_tsc_checker: self-checking test of the checker.
//
// 8 outputs with the Hamming code (4 check bits) and 12 outputs with single
// even parity. Code words are built with a reference encoder written from the
// coefficient matrix row by row. Checked:
//   * a valid code word gives a complementary z (01 or 10) and syndrome 0;
//   * every single wrong output gives a non-complementary z, the syndrome is
//     that output's matrix row, and ~syndrome[2:0] is the output's index;
//   * every single wrong check bit is flagged;
//   * random corruptions are flagged exactly when the syndrome is non-zero;
//   * both values of z appear among valid words (the checker's output pair is
//     exercised in both code states).
module tb_tsc_checker;
  import tsc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] out8; logic [3:0] chk8; logic [1:0] z8; logic [3:0] syn8;
  tsc_checker #(.NO(8), .CODE(CODE_HAMMING)) dut8 (
    .out(out8), .check(chk8), .z(z8), .syndrome(syn8));

  logic [11:0] out12; logic [0:0] chk12; logic [1:0] z12; logic [0:0] syn12;
  tsc_checker #(.NO(12), .CODE(CODE_PARITY)) dut12 (
    .out(out12), .check(chk12), .z(z12), .syndrome(syn12));

  localparam logic [3:0] ROW8 [8] = '{4'b1111, 4'b0111, 4'b1011, 4'b0011,
                                      4'b1101, 4'b0101, 4'b1001, 4'b0001};

  // Row i as a check-bit vector (bit k = x_(k+1)).
  function automatic logic [3:0] row(int i);
    return {ROW8[i][0], ROW8[i][1], ROW8[i][2], ROW8[i][3]};
  endfunction
  function automatic logic [3:0] enc8(logic [7:0] o);
    logic [3:0] x = '0;
    for (int i = 0; i < 8; i++) if (o[i]) x ^= row(i);
    return x;
  endfunction

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [7:0] good;
    logic [3:0] flip;
    int seen01 = 0, seen10 = 0;
    out12 = '0; chk12 = '0;
    for (int v = 0; v < 256; v++) begin
      good = v[7:0];
      out8 = good; chk8 = enc8(good);
      #1;
      check(z8 == 2'b01 || z8 == 2'b10, $sformatf("valid word %02h z=%b", good, z8));
      check(syn8 == 4'd0, $sformatf("valid word %02h syndrome=%b", good, syn8));
      if (z8 == 2'b01) seen01++;
      if (z8 == 2'b10) seen10++;
      for (int i = 0; i < 8; i++) begin
        out8 = good ^ (8'd1 << i);
        #1;
        check(z8 == 2'b00 || z8 == 2'b11, $sformatf("output %0d wrong, word %02h z=%b", i, good, z8));
        check(syn8 == row(i), $sformatf("output %0d syndrome=%b", i, syn8));
        check(syn8[3] && (3'(~syn8[2:0]) == 3'(i)), $sformatf("output %0d located", i));
      end
      out8 = good;
      for (int k = 0; k < 4; k++) begin
        chk8 = enc8(good) ^ (4'd1 << k);
        #1;
        check(z8 == 2'b00 || z8 == 2'b11, $sformatf("check bit %0d wrong, word %02h", k, good));
      end
    end
    check(seen01 > 0 && seen10 > 0, "both valid checker states seen");
    for (int n = 0; n < 2000; n++) begin
      good = 8'($urandom);
      flip = 4'($urandom);
      out8 = good ^ 8'($urandom);
      chk8 = enc8(good) ^ flip;
      #1;
      check((z8[0] == z8[1]) == ((enc8(out8) ^ chk8) != 0),
            $sformatf("random word out=%02h chk=%b z=%b", out8, chk8, z8));
    end
    for (int n = 0; n < 1000; n++) begin
      out12 = 12'($urandom);
      chk12 = 1'($urandom);
      #1;
      check((z12[0] == z12[1]) == ((^out12) != chk12[0]),
            $sformatf("parity out=%03h chk=%b z=%b", out12, chk12, z12));
      check(syn12[0] == ((^out12) ^ chk12[0]), "parity syndrome");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
