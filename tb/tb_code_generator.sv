// tb_code_generator: self-checking test of the XOR-tree check-bit generator.
//
// Three instances are checked exhaustively or with random vectors:
//   * 8 outputs, Hamming code: the 4 check bits are compared against the
//     8x4 coefficient matrix written out row by row (1111, 0111, 1011, 0011,
//     1101, 0101, 1001, 0001 for x1..x4), for all 256 output words;
//   * 12 outputs, Hamming code (5 check bits): reference computed by
//     grouping outputs by the bits of their index, random words;
//   * 2 outputs, single odd parity: x = ~(o1 ^ o2), all 4 words.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_code_generator;
  import tsc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // 8 outputs, Hamming
  logic [7:0] o8;  logic [3:0] x8;
  code_generator #(.NO(8), .CODE(CODE_HAMMING), .ODD(1'b0)) dut8 (.o(o8), .x(x8));
  // 12 outputs, Hamming
  logic [11:0] o12; logic [4:0] x12;
  code_generator #(.NO(12), .CODE(CODE_HAMMING), .ODD(1'b0)) dut12 (.o(o12), .x(x12));
  // 2 outputs, single odd parity
  logic [1:0] o2; logic [0:0] x2;
  code_generator #(.NO(2), .CODE(CODE_PARITY), .ODD(1'b1)) dut2 (.o(o2), .x(x2));

  // Rows of the 8x4 matrix, written {x1,x2,x3,x4} left to right.
  localparam logic [3:0] ROW8 [8] = '{4'b1111, 4'b0111, 4'b1011, 4'b0011,
                                      4'b1101, 4'b0101, 4'b1001, 4'b0001};

  function automatic logic [3:0] ref8(logic [7:0] o);
    logic [3:0] x = '0;
    for (int i = 0; i < 8; i++)
      for (int k = 0; k < 4; k++)
        if (o[i] && ROW8[i][3-k]) x[k] = ~x[k];
    return x;
  endfunction

  function automatic logic [4:0] ref12(logic [11:0] o);
    logic [4:0] x = '0;
    for (int i = 0; i < 12; i++) if (o[i]) begin
      x[4] = ~x[4];
      for (int b = 0; b < 4; b++) if (((i >> b) & 1) == 0) x[b] = ~x[b];
    end
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
    for (int v = 0; v < 256; v++) begin
      o8 = v[7:0];
      #1;
      check(x8 === ref8(o8), $sformatf("n8 o=%02h x=%h exp=%h", o8, x8, ref8(o8)));
    end
    for (int n = 0; n < 2000; n++) begin
      o12 = 12'($urandom);
      #1;
      check(x12 === ref12(o12), $sformatf("n12 o=%03h x=%h exp=%h", o12, x12, ref12(o12)));
    end
    for (int v = 0; v < 4; v++) begin
      o2 = v[1:0];
      #1;
      check(x2[0] === ~(o2[0] ^ o2[1]), $sformatf("odd parity o=%b x=%b", o2, x2));
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
