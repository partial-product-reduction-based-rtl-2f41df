// tb_lut_counter_pp: exhaustive self-check of the pre-processed LUT-Counter
// in its (3,2), (7,3) and default (15,4) sizes: the output must be the number
// of ones of every input word.  It also checks the stored table sizes,
// 12, 162 and 17,496 bits (2*3^floor(p/2) words of q bits).
module tb_lut_counter_pp;
  int checks = 0;
  int failures = 0;

  logic [2:0]  w3;
  logic [1:0]  y3;
  logic [6:0]  w7;
  logic [2:0]  y7;
  logic [14:0] w15;
  logic [3:0]  y15;

  lut_counter_pp #(.P(3)) dut3  (.w(w3),  .y(y3));
  lut_counter_pp #(.P(7)) dut7  (.w(w7),  .y(y7));
  lut_counter_pp          dut15 (.w(w15), .y(y15));

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
    w3 = '0;
    w7 = '0;
    w15 = '0;
    for (int a = 0; a < 8; a++) begin
      w3 = 3'(a);
      #1;
      check(int'(y3) == $countones(w3), $sformatf("(3,2) w=%b y=%0d", w3, y3));
    end
    for (int a = 0; a < 128; a++) begin
      w7 = 7'(a);
      #1;
      check(int'(y7) == $countones(w7), $sformatf("(7,3) w=%b y=%0d", w7, y7));
    end
    for (int a = 0; a < 32768; a++) begin
      w15 = 15'(a);
      #1;
      check(int'(y15) == $countones(w15), $sformatf("(15,4) w=%b y=%0d", w15, y15));
    end
    check(dut3.WORDS * 2 == 12, "(3,2) table is 12 bits");
    check(dut7.WORDS * 3 == 162, "(7,3) table is 162 bits");
    check(dut15.WORDS * 4 == 17496, "(15,4) table is 17496 bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
