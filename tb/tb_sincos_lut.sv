// Self-checking testbench of sincos_lut: sweeps all 1024 phases and compares
// both outputs, one clock after the phase, with round(2047*cos/sin).
module tb_sincos_lut;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0;
  logic [9:0] phase = '0;
  logic signed [11:0] cos_o, sin_o;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sincos_lut dut (.*);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 1024; p++) begin
      int ec, es;
      @(negedge clk); phase = 10'(p);
      @(negedge clk);
      ec = int'($floor(2047.0 * $cos(2.0 * PI * p / 1024.0) + 0.5));
      es = int'($floor(2047.0 * $sin(2.0 * PI * p / 1024.0) + 0.5));
      checks++;
      if (int'(cos_o) != ec || int'(sin_o) != es) begin
        failures++;
        if (failures < 10) $display("FAIL phase %0d: %0d,%0d expected %0d,%0d", p, cos_o, sin_o, ec, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
