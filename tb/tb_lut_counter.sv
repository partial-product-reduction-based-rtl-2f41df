// tb_lut_counter: exhaustive self-check of the full-table LUT-Counter in
// its default (5,2) form with t=2 (1024 addresses) and in (3,2) and (7,3)
// forms with t=1.  The expected output is the column-weighted count of ones,
// computed here from the input bits.
module tb_lut_counter;
  int checks = 0;
  int failures = 0;

  logic [4:0][1:0] x52;
  logic [3:0]      y52;
  logic [2:0][0:0] x32;
  logic [1:0]      y32;
  logic [6:0][0:0] x73;
  logic [2:0]      y73;

  lut_counter                    dut52 (.x(x52), .y(y52));
  lut_counter #(.P(3), .T(1))    dut32 (.x(x32), .y(y32));
  lut_counter #(.P(7), .T(1))    dut73 (.x(x73), .y(y73));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    x32 = '0;
    x73 = '0;
    for (int a = 0; a < 1024; a++) begin
      x52 = 10'(a);
      #1;
      e = 0;
      for (int r = 0; r < 5; r++) e += int'(x52[r][0]) + 2 * int'(x52[r][1]);
      check(int'(y52) == e, $sformatf("(5,2) x=%b y=%0d exp=%0d", x52, y52, e));
    end
    for (int a = 0; a < 8; a++) begin
      x32 = 3'(a);
      #1;
      check(int'(y32) == $countones(x32), $sformatf("(3,2) x=%b y=%0d", x32, y32));
    end
    for (int a = 0; a < 128; a++) begin
      x73 = 7'(a);
      #1;
      check(int'(y73) == $countones(x73), $sformatf("(7,3) x=%b y=%0d", x73, y73));
    end
    // Output width of the default configuration: 4 lines for 5 x 3 = 15.
    check($bits(y52) == 4, "(5,2) has q = 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
