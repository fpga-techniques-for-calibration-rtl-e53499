// Self-checking testbench of beamformer. Part 1 feeds plane waves from each
// of the 25 scan angles and checks that the beam of that angle has the
// largest power. Part 2 overwrites some weights with random values, feeds
// random columns and compares every beam output and power bit-exactly with
// an integer model here (weights re-derived from the steering formula where
// not overwritten). The latency (outputs on the third clock edge after the inputs are applied) is checked on every output.
module tb_beamformer;
  import sa_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int B = 25, C = 8;
  logic clk = 0, rst_n = 0;
  logic w_we = 0;
  logic [4:0] w_beam = '0;
  logic [2:0] w_elem = '0;
  logic signed [11:0] w_re = '0, w_im = '0;
  logic in_valid = 0, in_last = 0;
  logic [9:0] in_bin = '0;
  cplx16_t q [C];
  logic out_valid, out_last;
  logic [9:0] out_bin;
  logic signed [20:0] t_re [B], t_im [B];
  logic [41:0] power [B];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  beamformer dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ar [B][C], ai [B][C];
  // expected outputs keyed by bin, checked when the bin comes out
  longint er [1024][B], ei [1024][B];
  int     exp_peak [1024];
  int     sent_cycle [1024];
  int     cycle = 0;
  always @(posedge clk) cycle++;

  always @(negedge clk) if (rst_n && out_valid) begin
    int k;
    k = int'(out_bin);
    checks++;
    if (cycle - sent_cycle[k] != 2) begin failures++; $display("FAIL latency bin %0d", k); end
    if (exp_peak[k] >= 0) begin
      int best;
      best = 0;
      for (int b = 1; b < B; b++) if (power[b] > power[best]) best = b;
      checks++;
      if (best != exp_peak[k]) begin failures++; $display("FAIL plane wave %0d peaks at beam %0d", exp_peak[k], best); end
    end else begin
      for (int b = 0; b < B; b++) begin
        longint pw;
        pw = er[k][b] * er[k][b] + ei[k][b] * ei[k][b];
        checks++;
        if (longint'(t_re[b]) != er[k][b] || longint'(t_im[b]) != ei[k][b] || longint'(power[b]) != pw) begin
          failures++;
          if (failures < 10) $display("FAIL bin %0d beam %0d: %0d,%0d expected %0d,%0d", k, b, t_re[b], t_im[b], er[k][b], ei[k][b]);
        end
      end
    end
  end

  task automatic send(input int k);
    @(negedge clk);
    in_valid = 1; in_bin = 10'(k); in_last = (k == 1023);
    sent_cycle[k] = cycle + 1;
  endtask

  initial begin
    for (int b = 0; b < B; b++)
      for (int n = 0; n < C; n++) begin
        real ph;
        ph = PI * n * $sin((-60.0 + 5.0 * b) * PI / 180.0);
        ar[b][n] = int'($floor($cos(ph) * 1024.0 + 0.5));
        ai[b][n] = int'($floor($sin(ph) * 1024.0 + 0.5));
      end
    for (int n = 0; n < C; n++) q[n] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // part 1: plane waves
    for (int k = 0; k < B; k++) begin
      real th;
      th = (-60.0 + 5.0 * k) * PI / 180.0;
      exp_peak[k] = k;
      send(k);
      for (int n = 0; n < C; n++) begin
        q[n].re = 16'(int'($floor(12000.0 * $cos(-PI * n * $sin(th)) + 0.5)));
        q[n].im = 16'(int'($floor(12000.0 * $sin(-PI * n * $sin(th)) + 0.5)));
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    // overwrite some weights
    for (int i = 0; i < 20; i++) begin
      int b, n;
      b = $urandom_range(0, B - 1); n = $urandom_range(0, C - 1);
      ar[b][n] = int'($urandom_range(0, 4095)) - 2048;
      ai[b][n] = int'($urandom_range(0, 4095)) - 2048;
      @(negedge clk);
      w_we = 1; w_beam = 5'(b); w_elem = 3'(n); w_re = 12'(ar[b][n]); w_im = 12'(ai[b][n]);
    end
    @(negedge clk); w_we = 0;
    // part 2: random columns
    for (int k = 100; k < 400; k++) begin
      exp_peak[k] = -1;
      send(k);
      for (int n = 0; n < C; n++) begin
        q[n].re = 16'($urandom_range(0, 65535));
        q[n].im = 16'($urandom_range(0, 65535));
      end
      for (int b = 0; b < B; b++) begin
        longint sr, si;
        sr = 0; si = 0;
        for (int n = 0; n < C; n++) begin
          sr += longint'(q[n].re) * ar[b][n] - longint'(q[n].im) * ai[b][n];
          si += longint'(q[n].re) * ai[b][n] + longint'(q[n].im) * ar[b][n];
        end
        er[k][b] = (sr + 512) >>> 10;
        ei[k][b] = (si + 512) >>> 10;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
