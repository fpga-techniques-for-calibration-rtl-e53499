// Self-checking testbench of cal_corrector: random bins, gains and phases are
// streamed through; each output is compared with the floating-point value of
// X * a * exp(+-j*phi) (sign by frequency half), within 2 LSB plus the
// table's rounding, and must appear exactly two clocks after its input.
module tb_cal_corrector;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  logic [15:0] gain = '0;
  logic [9:0] phase = '0;
  logic in_valid = 0;
  logic [9:0] in_bin = '0;
  logic [1:0] in_tag = '0;
  logic signed [15:0] in_re = '0, in_im = '0;
  logic out_valid;
  logic [9:0] out_bin;
  logic [1:0] out_tag;
  logic signed [15:0] out_re, out_im;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cal_corrector dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // expected-value queue, two clocks deep
  real qr [$], qi [$];
  int  qb [$];

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      real er, ei, tol;
      int  b;
      er = qr.pop_front(); ei = qi.pop_front(); b = qb.pop_front();
      tol = 3.0 + 0.002 * ($sqrt(er * er + ei * ei));
      checks++;
      if (int'(out_bin) != b || fabs(real'(out_re) - er) > tol || fabs(real'(out_im) - ei) > tol) begin
        failures++;
        if (failures < 10) $display("FAIL bin %0d: %0d,%0d expected %f,%f", out_bin, out_re, out_im, er, ei);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      real g, ph, xr, xi, cr, ci, yr, yi;
      @(negedge clk);
      if (i % 100 == 0) begin
        gain  = 16'($urandom_range(8192, 32767));     // 0.5 .. 2.0
        phase = 10'($urandom_range(0, 1023));
      end
      in_valid = ($urandom_range(0, 3) != 0);
      in_bin   = 10'($urandom_range(0, 1023));
      in_re    = 16'(int'($urandom_range(0, 30000)) - 15000);
      in_im    = 16'(int'($urandom_range(0, 30000)) - 15000);
      in_tag   = 2'(i);
      if (in_valid) begin
        g  = real'(gain) / 16384.0;
        ph = 2.0 * PI * real'(phase) / 1024.0;
        if (in_bin > 512) ph = -ph;
        xr = real'(in_re) * g; xi = real'(in_im) * g;
        cr = 2047.0 * $cos(ph) / 2048.0; ci = 2047.0 * $sin(ph) / 2048.0;
        yr = xr * cr - xi * ci; yi = xr * ci + xi * cr;
        if (yr > 32767.0) yr = 32767.0;
        if (yr < -32768.0) yr = -32768.0;
        if (yi > 32767.0) yi = 32767.0;
        if (yi < -32768.0) yi = -32768.0;
        qr.push_back(yr); qi.push_back(yi); qb.push_back(int'(in_bin));
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (qr.size() != 0) begin failures++; $display("FAIL %0d outputs missing", qr.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
