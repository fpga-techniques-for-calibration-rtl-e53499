// Self-checking testbench of back_substitution (N = 8): random
// well-conditioned upper-triangular systems are solved and every weight is
// compared with a floating-point back substitution of the same R and u,
// scaled by 2**12, within 2 LSB. A zero diagonal element must set singular.
// The solve time must stay within N*(NW+3) + N*(N-1)/2 clocks.
module tb_back_substitution;
  localparam int N = 8, W = 26, WW = 24, WF = 12;
  localparam int NW = W + WW + 3 + 2;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [W-1:0] r_mat [N][N];
  logic signed [W-1:0] u_vec [N];
  logic busy, done, singular;
  logic signed [WW-1:0] w [N];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  back_substitution dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_solve(input bit make_singular);
    real wr [N];
    int cyc;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (j < i)       r_mat[i][j] = '0;
        else if (j == i) r_mat[i][j] = W'($urandom_range(200000, 2000000));
        else             r_mat[i][j] = W'(int'($urandom_range(0, 800000)) - 400000);
    for (int i = 0; i < N; i++) u_vec[i] = W'(int'($urandom_range(0, 4000000)) - 2000000);
    if (make_singular) r_mat[3][3] = '0;
    for (int i = N - 1; i >= 0; i--) begin
      real acc;
      acc = real'(u_vec[i]);
      for (int j = i + 1; j < N; j++) acc -= real'(r_mat[i][j]) * wr[j];
      wr[i] = acc / real'(r_mat[i][i]);
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > N * (NW + 3) + N * (N - 1) / 2 + 2) begin failures++; $display("FAIL took %0d clocks", cyc); end
    checks++;
    if (singular != make_singular) begin failures++; $display("FAIL singular flag %0d", singular); end
    if (!make_singular)
      for (int i = 0; i < N; i++) begin
        real e;
        e = real'(w[i]) - wr[i] * 4096.0;
        checks++;
        if (e > 2.0 || e < -2.0) begin failures++; $display("FAIL w[%0d] = %0d expected %f", i, w[i], wr[i] * 4096.0); end
      end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      u_vec[i] = '0;
      for (int j = 0; j < N; j++) r_mat[i][j] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) run_solve(1'b0);
    run_solve(1'b1);
    run_solve(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
