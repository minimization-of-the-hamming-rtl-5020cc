// tb_dup_xor_predictor: self-checking test of the duplicate + XOR-tree
// predictor.
//
// On the default three-input example (Hamming, 2 check bits) the check bits
// must be x1 = f, x2 = f ^ e for every input; with single odd parity x must
// equal b c. Upsets in every cell of the duplicate must change the check bits
// only while their address is applied, by the matrix row of the upset output
// (x1 and x2 for f, x2 only for e).
module tb_dup_xor_predictor;
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

  dup_xor_predictor dut_h (
    .in(in3), .check(chk_h), .seu_en(seu_en), .seu_addr(seu_addr), .seu_mask(seu_mask));
  dup_xor_predictor #(.CODE(CODE_PARITY), .ODD(1'b1)) dut_p (
    .in(in3), .check(chk_p), .seu_en(1'b0), .seu_addr(3'd0), .seu_mask(2'b00));

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic f, e;
    logic [1:0] delta;
    seu_en = 1'b0; seu_addr = '0; seu_mask = '0;
    for (int v = 0; v < 8; v++) begin
      in3 = v[2:0];
      #1;
      f = F_COL[v]; e = E_COL[v];
      check(chk_h === {f ^ e, f}, $sformatf("hamming cba=%b x=%b", in3, chk_h));
      check(chk_p[0] === (in3[2] & in3[1]), $sformatf("x=bc cba=%b", in3));
    end
    for (int fa = 0; fa < 8; fa++) begin
      for (int bit_i = 0; bit_i < 2; bit_i++) begin
        seu_en = 1'b1; seu_addr = fa[2:0]; seu_mask = 2'b01 << bit_i;
        delta = (bit_i == 0) ? 2'b11 : 2'b10;
        for (int v = 0; v < 8; v++) begin
          in3 = v[2:0];
          #1;
          f = F_COL[v]; e = E_COL[v];
          check(chk_h === ({f ^ e, f} ^ ((v == fa) ? delta : 2'b00)),
                $sformatf("upset addr=%0d bit=%0d in=%0d x=%b", fa, bit_i, v, chk_h));
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
