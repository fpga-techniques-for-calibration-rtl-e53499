// Triangular systolic array for CORDIC-based QRD-RLS.
//
// Solves, recursively and row by row, the exponentially weighted
// least-squares problem X w ~ y by QR updating: every new input row
// (x_1 .. x_N and the reference sample y) is rotated into the upper
// triangular matrix R and the transformed reference vector u with Givens
// rotations, so that afterwards R w = u holds for the least-squares weights.
// Row i of the array has one boundary cell (vectoring mode, holds R[i][i])
// and N-i internal cells (rotation mode, hold R[i][j] for j > i and u[i] in
// the last column). The rotated values leave each internal cell downwards and
// form the input of the next row.
//
// Timing: the array works in beats of ITER+3 clocks (the cell latency plus two
// clocks of hand-over). Within a beat all cells of a row rotate in lockstep; between
// beats the data move down one row, so the rows form an N-stage pipeline and a
// new input row is accepted every beat (in_ready is high between beats). A row
// leaves the pipeline N beats after it entered. When no row is offered the
// array keeps beating until the pipeline is empty; idle is then high and R/u
// hold the final values. clear zeroes R and u.
//
// Number format: external inputs are DW-bit integers; inside the array they
// carry FRAC extra fractional bits (R and u are W-bit values with FRAC
// fractional bits). The triangular structure, CORDIC cells and recursive
// update follow the published design; the array size N (the paper gives none;
// the default matches the eight-channel receiver), the forgetting factor, the
// beat organisation and widths are choices of this design.
module qrd_array #(
  parameter int unsigned N         = 8,
  parameter int unsigned DW        = 16,
  parameter int unsigned W         = 26,
  parameter int unsigned FRAC      = 4,
  parameter int unsigned ITER      = 16,
  parameter int unsigned LAMBDA_SH = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] x_in [N],
  input  logic signed [DW-1:0] y_in,
  output logic                 idle,
  output logic signed [W-1:0]  r_mat [N][N],
  output logic signed [W-1:0]  u_vec [N]
);
  // cell outputs, indexed [row][column]; column N is the u column
  logic signed [W-1:0] xo   [N][N+1];
  logic signed [W-1:0] ro   [N][N+1];
  logic                dout [N][N+1];    // micro-rotation directions
  logic                dirs [N];

  logic signed [W-1:0] row0 [N+1];       // latched input row
  logic [N-1:0]        vr;               // which rows hold valid data this beat
  logic                beat_start, running;
  logic [$clog2(ITER+2)-1:0] cnt;

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = i; j <= N; j++) begin : g_col
      logic signed [W-1:0] xin;
      if (i == 0) begin : g_top
        assign xin = row0[j];
      end else begin : g_mid
        assign xin = xo[i-1][j];
      end
      qrd_cordic_cell #(.BOUNDARY(j == i), .W(W), .ITER(ITER), .LAMBDA_SH(LAMBDA_SH)) u_cell (
        .clk(clk), .rst_n(rst_n), .clear(clear),
        .start(beat_start && vr[i]), .x_in(xin),
        .dir_in(dirs[i]), .dir_out(dout[i][j]),
        .done(), .x_out(xo[i][j]), .r_out(ro[i][j]));
    end
    assign dirs[i] = dout[i][i];
    for (genvar j = 0; j < i; j++) begin : g_low
      assign xo[i][j] = '0;
      assign ro[i][j] = '0;
      assign dout[i][j] = 1'b0;
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) r_mat[i][j] = ro[i][j];
      u_vec[i] = ro[i][N];
    end
  end

  // ------------------------------------------------------------ beat control
  assign in_ready = !running && !clear;
  assign idle     = !running && (vr[N-2:0] == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; beat_start <= 1'b0; cnt <= '0; vr <= '0;
      for (int j = 0; j <= N; j++) row0[j] <= '0;
    end else begin
      beat_start <= 1'b0;
      if (clear) begin
        running <= 1'b0;
        vr      <= '0;
      end else if (!running) begin
        if (in_valid || (vr[N-2:0] != '0)) begin
          for (int j = 0; j < N; j++) row0[j] <= W'(x_in[j]) <<< FRAC;
          row0[N]    <= W'(y_in) <<< FRAC;
          vr         <= {vr[N-2:0], in_valid};
          beat_start <= 1'b1;
          running    <= 1'b1;
          cnt        <= '0;
        end
      end else begin
        cnt <= cnt + 1'b1;
        if (cnt == $bits(cnt)'(ITER + 1)) running <= 1'b0;
      end
    end
  end
endmodule
