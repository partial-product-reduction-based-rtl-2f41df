// tb_final_adder: self-check of the final adder at W=48 with random and
// carry-chain corner operands against a sum computed in 64-bit arithmetic.
module tb_final_adder;
  localparam int W = 48;
  int checks = 0;
  int failures = 0;

  logic [W-1:0] x, y, s;
  logic [63:0]  e;

  final_adder dut (.x(x), .y(y), .s(s));

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
    for (int n = 0; n < 1000; n++) begin
      case (n)
        0: begin x = '1; y = 48'd1; end
        1: begin x = 48'h7FFF_FFFF_FFFF; y = 48'h7FFF_FFFF_FFFF; end
        default: begin x = {16'($urandom), 32'($urandom)}; y = {16'($urandom), 32'($urandom)}; end
      endcase
      #1;
      e = 64'(x) + 64'(y);
      check(s == e[W-1:0], $sformatf("%h + %h = %h", x, y, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
