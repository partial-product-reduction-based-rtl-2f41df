// tb_reduction_tree: self-check of the pipelined reduction tree at N=24
// (3 levels).  A random 24 x 48 bit matrix enters on most cycles, with
// idle cycles mixed in; each result must leave exactly 3 cycles later, in
// order, as two rows whose sum equals the input matrix's sum modulo 2^48.
module tb_reduction_tree;
  localparam int N = 24;
  localparam int W = 48;
  localparam int LAT = 3;
  int checks = 0;
  int failures = 0;

  logic                clk = 1'b0;
  logic                rst_n;
  logic                in_valid;
  logic [N-1:0][W-1:0] m_in;
  logic                out_valid;
  logic [W-1:0]        row0, row1;

  reduction_tree #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .m_in(m_in),
    .out_valid(out_valid), .row0(row0), .row1(row1)
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

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // Output side: compare at each rising edge, before inputs change.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [W-1:0] e;
      int c;
      if (exp_q.size() == 0) begin
        check(1'b0, "unexpected output");
      end else begin
        e = exp_q.pop_front();
        c = cyc_q.pop_front();
        check(row0 + row1 == e, $sformatf("sum %h vs %h", row0 + row1, e));
        check(cycle - c == LAT, $sformatf("latency %0d", cycle - c));
        received++;
      end
    end
  end

  initial begin
    logic [W-1:0] s;
    check(dut.STAGES == 3, "24 rows take 3 levels");
    rst_n = 1'b0;
    in_valid = 1'b0;
    m_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      s = '0;
      for (int r = 0; r < N; r++) begin
        m_in[r] = (n == 0) ? '1 : {16'($urandom), 32'($urandom)};
        s += m_in[r];
      end
      if (in_valid) begin
        exp_q.push_back(s);
        cyc_q.push_back(cycle);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    check(exp_q.size() == 0, "all results received");
    check(received > 300, "enough results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
