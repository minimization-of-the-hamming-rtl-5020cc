// tb_check_predictor: self-checking test of the merged check-bit predictor.
//
// Three configurations:
//   * default (three-input example, Hamming, 2 check bits): x1 = f and
//     x2 = f ^ e for every input;
//   * the same circuit with a single odd-parity bit: x = ~(f ^ e), which the
//     minimised equation x = b c must also match;
//   * a 4-input, 8-output circuit with a fixed table, Hamming code (4 check
//     bits): check bits compared with the 8x4 matrix written row by row.
// Finally upsets are injected in every cell of the default predictor and
// must appear only while their address is applied.
module tb_check_predictor;
  import tsc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam logic [7:0] F_COL = 8'b0100_1110;
  localparam logic [7:0] E_COL = 8'b0111_0001;

  logic [2:0] in3;
  logic [1:0] chk_h;
  logic [0:0] chk_p;
  logic       seu_en;
  logic [2:0] seu_addr;
  logic [1:0] seu_mask;

  check_predictor dut_h (
    .in(in3), .check(chk_h), .seu_en(seu_en), .seu_addr(seu_addr), .seu_mask(seu_mask));
  check_predictor #(.CODE(CODE_PARITY), .ODD(1'b1)) dut_p (
    .in(in3), .check(chk_p), .seu_en(1'b0), .seu_addr(3'd0), .seu_mask(1'b0));

  // 4-input, 8-output circuit: output word for input v is W8(v).
  function automatic logic [7:0] w8(int v);
    return 8'((v * 37 + 11) ^ (v << 3));
  endfunction
  function automatic logic [16*8-1:0] table8();
    logic [16*8-1:0] t;
    for (int v = 0; v < 16; v++) t[v*8 +: 8] = w8(v);
    return t;
  endfunction

  logic [3:0] in4;
  logic [3:0] chk8;
  check_predictor #(.NI(4), .NO(8), .TABLE(table8()), .CODE(CODE_HAMMING)) dut8 (
    .in(in4), .check(chk8), .seu_en(1'b0), .seu_addr(4'd0), .seu_mask(4'd0));

  localparam logic [3:0] ROW8 [8] = '{4'b1111, 4'b0111, 4'b1011, 4'b0011,
                                      4'b1101, 4'b0101, 4'b1001, 4'b0001};

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic f, e, b, c;
    logic [3:0] x;
    seu_en = 1'b0; seu_addr = '0; seu_mask = '0;
    for (int v = 0; v < 8; v++) begin
      in3 = v[2:0];
      #1;
      f = F_COL[v]; e = E_COL[v]; c = in3[2]; b = in3[1];
      check(chk_h === {f ^ e, f}, $sformatf("hamming cba=%b x=%b", in3, chk_h));
      check(chk_p[0] === ~(f ^ e), $sformatf("odd parity cba=%b x=%b", in3, chk_p));
      check(chk_p[0] === (b & c), $sformatf("x=bc cba=%b", in3));
    end
    for (int v = 0; v < 16; v++) begin
      in4 = v[3:0];
      #1;
      x = '0;
      for (int i = 0; i < 8; i++)
        if (w8(v)[i]) x = x ^ {ROW8[i][0], ROW8[i][1], ROW8[i][2], ROW8[i][3]};
      check(chk8 === x, $sformatf("8 outputs in=%0d x=%b exp=%b", v, chk8, x));
    end
    for (int fa = 0; fa < 8; fa++) begin
      for (int bit_i = 0; bit_i < 2; bit_i++) begin
        seu_en = 1'b1; seu_addr = fa[2:0]; seu_mask = 2'b01 << bit_i;
        for (int v = 0; v < 8; v++) begin
          in3 = v[2:0];
          #1;
          f = F_COL[v]; e = E_COL[v];
          check(chk_h === ({f ^ e, f} ^ ((v == fa) ? seu_mask : 2'b00)),
                $sformatf("upset addr=%0d bit=%0d in=%0d", fa, bit_i, v));
        end
      end
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
