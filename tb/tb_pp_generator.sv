// tb_pp_generator: self-check of the partial product generator at N=24.
// For random and corner operands every row must be a<<i when b[i] is set and
// zero otherwise, and the rows must add up to a*b.
module tb_pp_generator;
  localparam int N = 24;
  localparam int W = 2 * N;
  int checks = 0;
  int failures = 0;

  logic [N-1:0]        a, b;
  logic [N-1:0][W-1:0] pp;

  pp_generator dut (.a(a), .b(b), .pp(pp));

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
    logic [W-1:0] sum;
    for (int n = 0; n < 300; n++) begin
      case (n)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '1; end
        2: begin a = '1; b = 24'h000001; end
        default: begin a = N'($urandom); b = N'($urandom); end
      endcase
      #1;
      sum = '0;
      for (int i = 0; i < N; i++) begin
        check(pp[i] == (b[i] ? ({{N{1'b0}}, a} << i) : '0), $sformatf("row %0d", i));
        sum += pp[i];
      end
      check(sum == {{N{1'b0}}, a} * {{N{1'b0}}, b}, $sformatf("sum a=%h b=%h", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
