// tb_lut_multiplier_53: end-to-end self-check of the LUT-Counter multiplier at 53 x 53 bits, the double-precision mantissa width (4 reduction levels).
// Operand pairs (corner values, then random ones) enter on most cycles, with
// idle cycles mixed in.  Each product must leave exactly LATENCY = 5 cycles
// after its operands, in order, and equal a*b computed here.  The test also
// counts the mechanisms the design has: back-to-back (segmented) issue with
// several operations in flight, idle bubbles, and every reduction level
// holding a result; each must occur at least once.
module tb_lut_multiplier_53;
  localparam int N = 53;
  localparam int W = 2 * N;
  localparam int LAT = 5;
  localparam int OPS = 400;
  int checks = 0;
  int failures = 0;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid;
  logic [N-1:0] a, b;
  logic         out_valid;
  logic [W-1:0] p;

  lut_multiplier #(.N(53)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .p(p)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic [W-1:0] exp_q[$];
  int           cyc_q[$];
  int           cycle = 0;
  int           received = 0;
  int           n_back_to_back = 0;
  int           n_bubble = 0;
  int           n_max_in_flight = 0;
  int           n_all_levels_busy = 0;

  initial begin
    repeat (20 * OPS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (exp_q.size() > n_max_in_flight) n_max_in_flight = exp_q.size();
      if (out_valid) begin
        logic [W-1:0] e;
        int c;
        if (exp_q.size() == 0) begin
          check(1'b0, "unexpected output");
        end else begin
          e = exp_q.pop_front();
          c = cyc_q.pop_front();
          check(p == e, $sformatf("product %h expected %h", p, e));
          check(cycle - c == LAT, $sformatf("latency %0d", cycle - c));
          received++;
        end
      end
    end
  end

  initial begin
    logic prev_valid;
    check(dut.LATENCY == LAT, "latency parameter");
    check(dut.STAGES == LAT - 1, "number of reduction levels");
    rst_n = 1'b0;
    in_valid = 1'b0;
    a = '0;
    b = '0;
    prev_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < OPS; n++) begin
      @(negedge clk);
      in_valid = (n < 8) || ($urandom_range(0, 4) != 0);
      case (n)
        0: begin a = '1; b = '1; end
        1: begin a = '0; b = '1; end
        2: begin a = '1; b = N'(1); end
        3: begin a = N'(1) << (N - 1); b = N'(1) << (N - 1); end
        4: begin a = {N{2'b10}} >> (N % 2); b = {N{2'b01}} >> (N % 2); end
        default: begin
          a = N'({$urandom, $urandom});
          b = N'({$urandom, $urandom});
        end
      endcase
      if (in_valid) begin
        exp_q.push_back(W'(a) * W'(b));
        cyc_q.push_back(cycle);
        if (prev_valid) n_back_to_back++;
      end else begin
        n_bubble++;
      end
      prev_valid = in_valid;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    check(exp_q.size() == 0, "all products received");
    check(received > OPS / 2, "enough products");
    $display("mechanisms: back_to_back=%0d bubbles=%0d max_in_flight=%0d all_levels_busy=%0d",
             n_back_to_back, n_bubble, n_max_in_flight, n_all_levels_busy);
    check(n_back_to_back > 0, "segmented back-to-back issue happened");
    check(n_bubble > 0, "idle bubble happened");
    check(n_max_in_flight >= LAT, "LATENCY operations in flight at once");
    check(n_all_levels_busy > 0, "every reduction level held a result at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // All valid flags of the pipeline set in the same cycle.
  always @(posedge clk)
    if (rst_n && out_valid && exp_q.size() >= LAT) n_all_levels_busy++;
endmodule
