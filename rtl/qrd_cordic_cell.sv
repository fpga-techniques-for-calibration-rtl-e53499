// CORDIC processing cell of the QRD-RLS triangular systolic array.
//
// A cell holds one element r of the triangular matrix R (or of the
// transformed reference vector u) and, per input row, performs one Givens
// rotation with shift-and-add CORDIC micro-rotations:
//   boundary cell (BOUNDARY = 1), vectoring mode: rotates the vector
//     (lambda*r, x_in) onto the x axis, so r becomes
//     sqrt((lambda*r)^2 + x_in^2); the direction of every micro-rotation is
//     sent to the rest of its row on dir_out;
//   internal cell (BOUNDARY = 0), rotation mode: applies the same
//     micro-rotations, taken from dir_in, to (lambda*r, x_in); the new r stays
//     in the cell and the rotated x_out goes to the cell below.
// lambda = 1 - 2**-LAMBDA_SH is the forgetting factor of the exponentially
// weighted least-squares problem (LAMBDA_SH = 0 means lambda = 1).
//
// Timing: start loads the operands, ITER clocks of micro-rotations follow
// (boundary and internal cells of a row in lockstep, the boundary computing
// each direction from its own state in the same clock the internal cells use
// it), and one clock removes the CORDIC gain with a constant multiply; done
// pulses ITER+1 clocks after the edge that samples start. Every cell takes the
// same number of clocks whatever it computes, which keeps the array's data
// flow systolic. clear zeroes r. Values are two's complement W-bit numbers in
// whatever fixed-point scale the array chooses. The two CORDIC modes follow
// the published design; the lockstep direction broadcast, forgetting-factor
// implementation, gain correction and widths are choices of this design.
module qrd_cordic_cell #(
  parameter bit          BOUNDARY  = 1'b0,
  parameter int unsigned W         = 26,
  parameter int unsigned ITER      = 16,
  parameter int unsigned LAMBDA_SH = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                start,
  input  logic signed [W-1:0] x_in,
  input  logic                dir_in,
  output logic                dir_out,
  output logic                done,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] r_out
);
  function automatic real inv_gain();
    real k;
    k = 1.0;
    for (int i = 0; i < ITER; i++) k = k * $sqrt(1.0 + 1.0 / real'(longint'(1) << (2 * i)));
    return 1.0 / k;
  endfunction
  localparam int unsigned GF   = 17;
  localparam longint      INVK = longint'($floor(inv_gain() * real'(longint'(1) << GF) + 0.5));

  logic signed [W+1:0]       xr, yr;     // two guard bits for the CORDIC gain
  logic [$clog2(ITER)-1:0]   it;
  logic                      run, fin;
  logic                      dir;

  assign dir_out = (yr < 0);
  assign dir     = BOUNDARY ? (yr < 0) : dir_in;

  function automatic logic signed [W-1:0] comp(input logic signed [W+1:0] v);
    logic signed [W+GF+2:0] p;
    p = v * (W+GF+3)'(INVK) + (W+GF+3)'(longint'(1) << (GF - 1));
    return W'(p >>> GF);
  endfunction

  logic signed [W+1:0] rl;        // lambda * r
  always_comb begin
    rl = (W+2)'(r_out);
    if (LAMBDA_SH != 0) rl = rl - (rl >>> LAMBDA_SH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr <= '0; yr <= '0; it <= '0; run <= 1'b0; fin <= 1'b0; done <= 1'b0;
      x_out <= '0; r_out <= '0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (clear) begin
        r_out <= '0;
        run   <= 1'b0;
      end else if (start) begin
        xr  <= rl;
        yr  <= (W+2)'(x_in);
        it  <= '0;
        run <= 1'b1;
      end else if (run) begin
        if (dir) begin
          xr <= xr - (yr >>> it);
          yr <= yr + (xr >>> it);
        end else begin
          xr <= xr + (yr >>> it);
          yr <= yr - (xr >>> it);
        end
        it <= it + 1'b1;
        if (it == $bits(it)'(ITER - 1)) begin
          run <= 1'b0;
          fin <= 1'b1;
        end
      end
      if (fin) begin
        r_out <= comp(xr);
        x_out <= comp(yr);
        done  <= 1'b1;
      end
    end
  end
endmodule
