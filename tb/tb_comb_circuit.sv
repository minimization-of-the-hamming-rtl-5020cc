// tb_comb_circuit: self-checking test of the LUT-based original circuit.
//
// Uses the default table (three-input, two-output example). Every input
// combination is compared with the truth table written out per row, and with
// the minimised equations f = a'b + c'(a+b), e = a'b' + c(a'+b'). Then a
// single-event upset is placed in every LUT cell in turn: the output must
// show the flipped bit exactly when the upset address is applied and be
// correct for every other address (the upset is masked there).
module tb_comb_circuit;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] in;
  logic [1:0] out;
  logic       seu_en;
  logic [2:0] seu_addr;
  logic [1:0] seu_mask;

  comb_circuit dut (.*);

  // Truth table rows for cba = 000..111.
  localparam logic [7:0] F_COL = 8'b0100_1110;  // bit n = f for cba = n
  localparam logic [7:0] E_COL = 8'b0111_0001;  // bit n = e for cba = n

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic a, b, c, f, e;
    seu_en = 1'b0; seu_addr = '0; seu_mask = '0;
    for (int v = 0; v < 8; v++) begin
      in = v[2:0];
      {c, b, a} = in;
      #1;
      f = (~a & b) | (~c & (a | b));
      e = (~a & ~b) | (c & (~a | ~b));
      check(out[0] === F_COL[v] && out[1] === E_COL[v],
            $sformatf("table cba=%b out(e,f)=%b", in, out));
      check(out[0] === f && out[1] === e, $sformatf("equations cba=%b", in));
    end
    for (int fa = 0; fa < 8; fa++) begin
      for (int bit_i = 0; bit_i < 2; bit_i++) begin
        seu_en = 1'b1; seu_addr = fa[2:0]; seu_mask = 2'b01 << bit_i;
        for (int v = 0; v < 8; v++) begin
          in = v[2:0];
          #1;
          if (v == fa)
            check(out === ({E_COL[v], F_COL[v]} ^ seu_mask),
                  $sformatf("upset visible addr=%0d bit=%0d", fa, bit_i));
          else
            check(out === {E_COL[v], F_COL[v]},
                  $sformatf("upset masked addr=%0d bit=%0d in=%0d", fa, bit_i, v));
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
