// Self-checking testbench of fft1024_r4: loads a random 8-bit real signal
// plus a strong tone, runs the transform, and compares every output bin with
// a direct DFT computed here in floating point (scaled the same way, within a
// small rounding tolerance). Also checks the 1280-clock transform time.
module tb_fft1024_r4;
  localparam int N = 1024;
  localparam real PI = 3.14159265358979323846;
  localparam int TOL = 2;

  logic clk = 0, rst_n = 0;
  logic load_en = 0;
  logic [9:0] load_addr = '0;
  logic signed [7:0] load_data = '0;
  logic start = 0, busy, done;
  logic [9:0] rd_addr = '0;
  logic signed [15:0] rd_re, rd_im;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fft1024_r4 dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [N];
  real ctab [N], stab [N];

  function automatic int sat16(real v);
    int r;
    r = int'($floor(v / 4.0 + 0.5));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  task automatic run_case(input int kind);
    int cyc;
    for (int n = 0; n < N; n++) begin
      if (kind == 0) x[n] = int'($floor(90.0 * $cos(2.0 * PI * 37.0 * n / N + 0.7) + 0.5)) + ($urandom_range(0, 20) - 10);
      else           x[n] = $urandom_range(0, 255) - 128;
      @(negedge clk);
      load_en = 1; load_addr = n[9:0]; load_data = 8'(x[n]);
    end
    @(negedge clk); load_en = 0; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 1280 + 1) begin
      failures++; $display("FAIL: transform took %0d clocks", cyc - 1);
    end
    for (int k = 0; k < N; k++) begin
      real sr, si;
      int er, ei;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        sr += x[n] * ctab[(k * n) % N];
        si -= x[n] * stab[(k * n) % N];
      end
      @(negedge clk); rd_addr = k[9:0];
      @(negedge clk);
      er = sat16(sr) - int'(rd_re);
      ei = sat16(si) - int'(rd_im);
      checks++;
      if (er > TOL || er < -TOL || ei > TOL || ei < -TOL) begin
        failures++;
        if (failures < 10) $display("FAIL bin %0d: got %0d,%0d expected %0d,%0d", k, rd_re, rd_im, sat16(sr), sat16(si));
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      ctab[i] = $cos(2.0 * PI * i / N);
      stab[i] = $sin(2.0 * PI * i / N);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case(0);
    run_case(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
