// tb_lut_preproc: exhaustive self-check of the pre-processing stage for the
// (7,3) and (15,4) counter sizes.  For every input word it checks v against
// the OR/AND rule worked out bit by bit here, that v has the same number of
// ones as w, and that v_r is a subset of v_l; it also checks the worked
// example 001_1_110 -> 111_1_000.
module tb_lut_preproc;
  int checks = 0;
  int failures = 0;

  logic [6:0]  w7, v7;
  logic [14:0] w15, v15;

  lut_preproc #(.P(7))  dut7  (.w(w7),  .v(v7));
  lut_preproc #(.P(15)) dut15 (.w(w15), .v(v15));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Independent reference: pair bit i of the low field with bit i of the
  // high field.
  function automatic logic [14:0] ref_v(logic [14:0] w, int p);
    logic [14:0] v = '0;
    int h = p / 2;
    for (int i = 0; i < h; i++) begin
      v[h + 1 + i] = w[h + 1 + i] | w[i];
      v[i]         = w[h + 1 + i] & w[i];
    end
    v[h] = w[h];
    return v;
  endfunction

  function automatic bit subset_ok(logic [14:0] v, int p);
    int h = p / 2;
    for (int i = 0; i < h; i++)
      if (v[i] && !v[h + 1 + i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w7 = 7'b001_1_110;
    w15 = '0;
    #1;
    check(v7 == 7'b111_1_000, "worked example 0011110");
    for (int a = 0; a < 128; a++) begin
      w7 = 7'(a);
      #1;
      check(v7 == ref_v(15'(w7), 7)[6:0], $sformatf("P=7 w=%b v=%b", w7, v7));
      check($countones(v7) == $countones(w7), "P=7 popcount kept");
      check(subset_ok(15'(v7), 7), "P=7 v_r subset of v_l");
    end
    for (int a = 0; a < 32768; a++) begin
      w15 = 15'(a);
      #1;
      check(v15 == ref_v(w15, 15), $sformatf("P=15 w=%b v=%b", w15, v15));
      check($countones(v15) == $countones(w15), "P=15 popcount kept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
