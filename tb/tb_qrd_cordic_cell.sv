// Self-checking testbench of qrd_cordic_cell: one boundary cell drives two
// internal cells (a row of the array). For 60 random input rows the stored
// r values and the internal cells' x_out are compared with a floating-point
// Givens rotation with forgetting factor lambda = 1 - 2**-6:
//   r_b' = sqrt((lambda r_b)^2 + x_b^2), c = lambda r_b / r_b', s = x_b / r_b'
//   r'   = c lambda r + s x,  x_out = -s lambda r + c x.
// Also checks the ITER+1 clock latency and that clear empties the cell.
module tb_qrd_cordic_cell;
  localparam int W = 26;
  localparam real LAM = 1.0 - 1.0 / 64.0;
  logic clk = 0, rst_n = 0, clear = 0, start = 0;
  logic signed [W-1:0] xb = '0, x1 = '0, x2 = '0;
  logic dir;
  logic db, d1, d2;
  logic signed [W-1:0] xob, xo1, xo2, rb, r1, r2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  qrd_cordic_cell #(.BOUNDARY(1'b1)) u_b (.clk, .rst_n, .clear, .start, .x_in(xb), .dir_in(1'b0),
    .dir_out(dir), .done(db), .x_out(xob), .r_out(rb));
  qrd_cordic_cell #(.BOUNDARY(1'b0)) u_1 (.clk, .rst_n, .clear, .start, .x_in(x1), .dir_in(dir),
    .dir_out(), .done(d1), .x_out(xo1), .r_out(r1));
  qrd_cordic_cell #(.BOUNDARY(1'b0)) u_2 (.clk, .rst_n, .clear, .start, .x_in(x2), .dir_in(dir),
    .dir_out(), .done(d2), .x_out(xo2), .r_out(r2));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  // tolerance grows with the size of the operands (CORDIC angle resolution)
  function automatic bit close(input real got, input real exp_v, input real scale);
    return fabs(got - exp_v) <= 8.0 + 1.0e-4 * scale;
  endfunction

  initial begin
    real mb, m1, m2;
    mb = 0.0; m1 = 0.0; m2 = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      real fxb, fx1, fx2, nb, c, s, n1, n2, o1, o2;
      int cyc;
      fxb = real'(int'($urandom_range(0, 1 << 20)) - (1 << 19));
      fx1 = real'(int'($urandom_range(0, 1 << 20)) - (1 << 19));
      fx2 = real'(int'($urandom_range(0, 1 << 20)) - (1 << 19));
      @(negedge clk);
      xb = W'(longint'(fxb)); x1 = W'(longint'(fx1)); x2 = W'(longint'(fx2)); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!db) begin @(negedge clk); cyc++; end
      // model (from the design's own previous r, so errors do not accumulate)
      nb = $sqrt(LAM * mb * LAM * mb + fxb * fxb);
      c  = LAM * mb / nb;  s = fxb / nb;
      n1 = c * LAM * m1 + s * fx1;  o1 = -s * LAM * m1 + c * fx1;
      n2 = c * LAM * m2 + s * fx2;  o2 = -s * LAM * m2 + c * fx2;
      checks += 6;
      if (cyc != 18 || !d1 || !d2) begin failures++; $display("FAIL latency %0d", cyc); end
      if (!close(real'(rb), nb, nb)) begin failures++; $display("FAIL rb %0d vs %f", rb, nb); end
      if (!close(real'(r1), n1, fabs(m1) + fabs(fx1))) begin failures++; $display("FAIL r1 %0d vs %f", r1, n1); end
      if (!close(real'(r2), n2, fabs(m2) + fabs(fx2))) begin failures++; $display("FAIL r2 %0d vs %f", r2, n2); end
      if (!close(real'(xo1), o1, fabs(m1) + fabs(fx1))) begin failures++; $display("FAIL x1 %0d vs %f", xo1, o1); end
      if (!close(real'(xo2), o2, fabs(m2) + fabs(fx2))) begin failures++; $display("FAIL x2 %0d vs %f", xo2, o2); end
      mb = real'(rb); m1 = real'(r1); m2 = real'(r2);
    end
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    checks++;
    if (rb != 0 || r1 != 0 || r2 != 0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
