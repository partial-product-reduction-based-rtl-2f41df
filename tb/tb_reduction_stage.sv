// tb_reduction_stage: self-check of one reduction level in the three shapes
// the 24-bit multiplier uses: (15,4) pre-processed counters on 24 rows (8
// rows out), on 8 rows (4 rows out), and (5,2) counters with t=2 on 4 rows
// (2 rows out).  Random bit matrices are applied; the
// weighted sum of the output rows must equal that of the input rows modulo
// 2^W, and the output heights must be the expected ones.
module tb_reduction_stage;
  int checks = 0;
  int failures = 0;

  logic [23:0][47:0]  a_in;
  logic [7:0][47:0]   a_out;
  logic [7:0][47:0]   b_in;
  logic [3:0][47:0]   b_out;
  logic [3:0][47:0]   c_in;
  logic [1:0][47:0]   c_out;

  reduction_stage #(.W(48), .H_IN(24), .P(15), .T(1))  dut_a (.m_in(a_in), .m_out(a_out));
  reduction_stage #(.W(48), .H_IN(8), .P(15), .T(1))   dut_b (.m_in(b_in), .m_out(b_out));
  reduction_stage #(.W(48), .H_IN(4), .P(5), .T(2))    dut_c (.m_in(c_in), .m_out(c_out));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [47:0] rnd48();
    return {16'($urandom), 32'($urandom)};
  endfunction

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0]  si, so;
    check(dut_a.H_OUT == 8, "24 rows -> 8");
    check(dut_b.H_OUT == 4, "8 rows -> 4");
    check(dut_c.H_OUT == 2, "4 rows -> 2");
    for (int n = 0; n < 400; n++) begin
      for (int r = 0; r < 24; r++) a_in[r] = (n == 0) ? '1 : rnd48();
      for (int r = 0; r < 8; r++)  b_in[r] = (n == 0) ? '1 : rnd48();
      for (int r = 0; r < 4; r++)  c_in[r] = (n == 0) ? '1 : rnd48();
      #1;
      si = '0; so = '0;
      for (int r = 0; r < 24; r++) si += a_in[r];
      for (int r = 0; r < 8; r++)  so += a_out[r];
      check(si == so, $sformatf("(15,4) h24 sum %h vs %h", si, so));
      si = '0; so = '0;
      for (int r = 0; r < 8; r++) si += b_in[r];
      for (int r = 0; r < 4; r++) so += b_out[r];
      check(si == so, $sformatf("(15,4) h8 sum %h vs %h", si, so));
      si = '0; so = '0;
      for (int r = 0; r < 4; r++) si += c_in[r];
      for (int r = 0; r < 2; r++) so += c_out[r];
      check(si == so, $sformatf("(5,2) h4 sum %h vs %h", si, so));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
