// Self-checking testbench of qrd_array (N = 8). 80 random rows x with a
// reference y = x . c_true + small noise are fed at full rate. The final R
// and u are compared with a floating-point QR update (Givens rotations with
// the same forgetting factor and a positive diagonal), and the weights solved
// here from the array's own R and u must match c_true. Also checks that a row
// is accepted every ITER+3 = 19 clocks, that the array goes idle N beats after
// the last row, and that clear empties it.
module tb_qrd_array;
  localparam int  N = 8, W = 26, FRAC = 4;
  localparam real LAM = 1.0 - 1.0 / 64.0;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_ready, idle;
  logic signed [15:0] x_in [N];
  logic signed [15:0] y_in = '0;
  logic signed [W-1:0] r_mat [N][N];
  logic signed [W-1:0] u_vec [N];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  qrd_array dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real R [N][N+1];      // model, last column is u
  real c_true [N];

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic model_update(input real xr [N+1]);
    real v [N+1];
    v = xr;
    for (int i = 0; i < N; i++) begin
      real a, b, nr, c, s;
      for (int j = i; j <= N; j++) R[i][j] = LAM * R[i][j];
      a = R[i][i]; b = v[i];
      nr = $sqrt(a * a + b * b);
      if (nr == 0.0) begin c = 1.0; s = 0.0; end
      else begin c = a / nr; s = b / nr; end
      for (int j = i; j <= N; j++) begin
        real t;
        t       = c * R[i][j] + s * v[j];
        v[j]    = -s * R[i][j] + c * v[j];
        R[i][j] = t;
      end
    end
  endtask

  initial begin
    int last_acc, cyc, beats;
    real maxr;
    for (int i = 0; i < N; i++) begin
      x_in[i] = '0;
      for (int j = 0; j <= N; j++) R[i][j] = 0.0;
      c_true[i] = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    cyc = 0; last_acc = -1;
    for (int t = 0; t < 80; t++) begin
      real xr [N+1];
      real yv;
      yv = 0.0;
      for (int i = 0; i < N; i++) begin
        xr[i] = real'(int'($urandom_range(0, 8000)) - 4000);
        x_in[i] = 16'(int'(xr[i]));
        yv += xr[i] * c_true[i];
      end
      yv += real'(int'($urandom_range(0, 4)) - 2);
      xr[N] = real'(int'($floor(yv + 0.5)));
      y_in = 16'(int'(xr[N]));
      for (int i = 0; i <= N; i++) xr[i] = xr[i] * 16.0;   // FRAC bits
      model_update(xr);
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) begin @(posedge clk); cyc++; end
      cyc++;
      if (last_acc >= 0) begin
        checks++;
        if (cyc - last_acc != 19) begin failures++; $display("FAIL row period %0d", cyc - last_acc); end
      end
      last_acc = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    beats = 0;
    while (!idle) begin @(negedge clk); beats++; end
    checks++;
    if (beats < 19 * (N - 1) - 2 || beats > 19 * N + 2) begin failures++; $display("FAIL drain took %0d clocks", beats); end
    // compare R and u
    maxr = 0.0;
    for (int i = 0; i < N; i++) for (int j = i; j <= N; j++) if (fabs(R[i][j]) > maxr) maxr = fabs(R[i][j]);
    for (int i = 0; i < N; i++)
      for (int j = i; j <= N; j++) begin
        real got;
        got = (j == N) ? real'(u_vec[i]) : real'(r_mat[i][j]);
        checks++;
        if (fabs(got - R[i][j]) > 2.0e-3 * maxr) begin
          failures++; $display("FAIL R[%0d][%0d] = %f expected %f", i, j, got, R[i][j]);
        end
      end
    // back substitution in floating point from the array's values
    begin
      real w [N];
      for (int i = N - 1; i >= 0; i--) begin
        real acc;
        acc = real'(u_vec[i]);
        for (int j = i + 1; j < N; j++) acc -= real'(r_mat[i][j]) * w[j];
        w[i] = acc / real'(r_mat[i][i]);
        checks++;
        if (fabs(w[i] - c_true[i]) > 0.02) begin failures++; $display("FAIL w[%0d] = %f expected %f", i, w[i], c_true[i]); end
      end
    end
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    checks++;
    if (r_mat[0][0] != 0 || u_vec[N-1] != 0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
