// tb_tsc_top: end-to-end test of the self-checking circuit at its default
// parameters (three-input, two-output example, merged predictor, Hamming
// code with 2 check bits).
//
// Phase 1, fault free: every input gives the right outputs (f, e), the right
// check bits (f, f ^ e) and a complementary checker output.
// Phase 2, every single-event upset of the original circuit's LUT (8
// addresses x 2 bits) and of the predictor's LUT (8 x 2), plus every double
// upset of one original-circuit word: applied over all 8 inputs, an upset
// must raise the error exactly while its address is applied and stay masked
// otherwise. For single output upsets the syndrome must name the output.
// Each mechanism is counted (valid word, both checker states, detection in
// the circuit, detection in the predictor, double-upset detection, masking,
// location); one that never happens counts as a failure.
module tb_tsc_top;
  import tsc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam logic [7:0] F_COL = 8'b0100_1110;
  localparam logic [7:0] E_COL = 8'b0111_0001;

  logic [2:0]  in;
  logic [1:0]  out;
  logic [1:0]  check;
  logic [1:0]  z;
  logic        error;
  logic [1:0]  syndrome;
  logic        seu_en;
  seu_target_e seu_target;
  logic [2:0]  seu_addr;
  logic [1:0]  seu_mask;

  tsc_top dut (.*);

  int n_valid = 0, n_z01 = 0, n_z10 = 0, n_det_func = 0, n_det_pred = 0;
  int n_det_double = 0, n_masked = 0, n_located = 0;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic need(int count, string what);
    checks++;
    $display("mechanism %-28s seen %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    logic f, e;
    seu_en = 1'b0; seu_target = SEU_FUNC; seu_addr = '0; seu_mask = '0;
    @(posedge clk);
    // Phase 1
    for (int v = 0; v < 8; v++) begin
      in = v[2:0];
      @(posedge clk); #1;
      f = F_COL[v]; e = E_COL[v];
      chk(out === {e, f}, $sformatf("outputs cba=%b", in));
      chk(check === {f ^ e, f}, $sformatf("check bits cba=%b", in));
      chk(!error && (z == 2'b01 || z == 2'b10), $sformatf("valid word cba=%b z=%b", in, z));
      chk(syndrome == 2'b00, "fault-free syndrome");
      if (!error) n_valid++;
      if (z == 2'b01) n_z01++;
      if (z == 2'b10) n_z10++;
    end
    // Phase 2
    for (int tgt = 0; tgt < 2; tgt++) begin
      for (int fa = 0; fa < 8; fa++) begin
        for (int m = 1; m < 4; m++) begin
          if (tgt == 1 && m == 3) continue;
          seu_en = 1'b1;
          seu_target = seu_target_e'(tgt);
          seu_addr = fa[2:0];
          seu_mask = m[1:0];
          for (int v = 0; v < 8; v++) begin
            in = v[2:0];
            @(posedge clk); #1;
            if (v == fa) begin
              chk(error && (z == 2'b00 || z == 2'b11),
                  $sformatf("upset target=%0d addr=%0d mask=%b not detected", tgt, fa, m));
              if (error && tgt == 0 && m != 3) n_det_func++;
              if (error && tgt == 1) n_det_pred++;
              if (error && m == 3) n_det_double++;
              if (tgt == 0 && m != 3) begin
                // single wrong output j: syndrome is row j, {1, ~j}
                chk(syndrome == ((m == 1) ? 2'b11 : 2'b10),
                    $sformatf("syndrome addr=%0d mask=%b is %b", fa, m, syndrome));
                if (syndrome[1] && (~syndrome[0]) == (m == 2)) n_located++;
              end
            end else begin
              chk(!error, $sformatf("false alarm target=%0d addr=%0d in=%0d", tgt, fa, v));
              if (!error) n_masked++;
            end
          end
        end
      end
    end
    seu_en = 1'b0;
    need(n_valid,      "valid code word");
    need(n_z01,        "checker state z=01");
    need(n_z10,        "checker state z=10");
    need(n_det_func,   "upset in circuit detected");
    need(n_det_pred,   "upset in predictor detected");
    need(n_det_double, "double upset detected");
    need(n_masked,     "upset masked (not addressed)");
    need(n_located,    "faulty output located");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
