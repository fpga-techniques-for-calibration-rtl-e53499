// Self-checking testbench of seq_divider: random signed operands of all
// sizes plus corner cases (division by zero, -1, exact multiples) are checked
// against the language's own integer division, with the NW-clock latency.
module tb_seq_divider;
  localparam int NW = 32, DW = 24;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done, div_zero;
  logic signed [NW-1:0] num = '0, quo;
  logic signed [DW-1:0] den = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  seq_divider #(.NW(NW), .DW(DW)) dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input longint n, input longint d);
    longint exp_q;
    int cyc;
    @(negedge clk);
    num = NW'(n); den = DW'(d); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (d == 0) begin
      exp_q = (n < 0) ? -(longint'(1) << (NW - 1)) : (longint'(1) << (NW - 1)) - 1;
      if (quo != NW'(exp_q) || !div_zero) begin
        failures++; $display("FAIL %0d/0 -> %0d", n, quo);
      end
    end else begin
      exp_q = n / d;
      if (exp_q > (longint'(1) << (NW - 1)) - 1) exp_q = (longint'(1) << (NW - 1)) - 1;
      if (longint'(quo) != exp_q || div_zero) begin
        failures++; $display("FAIL %0d/%0d -> %0d expected %0d", n, d, quo, exp_q);
      end
      checks++;
      if (cyc != NW + 1) begin
        failures++; $display("FAIL latency %0d", cyc);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    one(100, 7); one(-100, 7); one(100, -7); one(-100, -7); one(0, 5);
    one(12345, 0); one(-12345, 0); one(1 << 20, 1 << 10);
    one(-(longint'(1) << 31), -1); one((longint'(1) << 31) - 1, 1);
    for (int i = 0; i < 300; i++) begin
      longint n, d;
      n = longint'(int'($urandom()));
      d = longint'(int'($urandom())) >>> (8 + $urandom_range(0, 20));
      if (d == 0) d = 3;
      one(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
