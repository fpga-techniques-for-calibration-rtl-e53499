// Self-checking testbench of cordic_vectoring: random vectors in all four
// quadrants (and a few axis cases) are compared with sqrt/atan2 computed in
// floating point; the magnitude must be within 2 LSB and the 10-bit phase
// within 1 LSB (modulo 2*pi). The latency (ITER+1 clocks after the sampling edge) is checked.
module tb_cordic_vectoring;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  logic signed [15:0] x_in = '0, y_in = '0;
  logic [17:0] mag;
  logic [9:0] phase;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cordic_vectoring dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int xr, input int yi);
    real m, p;
    int em, ep, cyc;
    @(negedge clk);
    x_in = 16'(xr); y_in = 16'(yi); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    m = $sqrt(real'(xr) * xr + real'(yi) * yi);
    p = $atan2(real'(yi), real'(xr)) / (2.0 * PI) * 1024.0;
    if (p < 0) p += 1024.0;
    em = int'(mag) - int'($floor(m + 0.5));
    ep = (int'(phase) - int'($floor(p + 0.5))) & 1023;
    if (ep > 512) ep -= 1024;
    checks += 3;
    if (em > 2 || em < -2) begin
      failures++; $display("FAIL mag (%0d,%0d): %0d vs %f", xr, yi, mag, m);
    end
    if ((m > 64.0) && (ep > 1 || ep < -1)) begin
      failures++; $display("FAIL phase (%0d,%0d): %0d vs %f", xr, yi, phase, p);
    end
    if (cyc != 18) begin
      failures++; $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    one(1000, 0); one(0, 1000); one(-1000, 0); one(0, -1000);
    one(32767, 32767); one(-32768, -32768); one(-20000, 5);
    for (int i = 0; i < 400; i++)
      one(int'($urandom_range(0, 65535)) - 32768, int'($urandom_range(0, 65535)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
