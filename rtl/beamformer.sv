// Digital beamformer: T = A * Q_CAL, one column per clock, with a power
// (magnitude-squared) output per beam.
//
// Every clock a column of the calibrated data matrix arrives: the eight
// channels' complex values at one frequency bin. The beamformer multiplies it
// by the stored scan matrix A (NUM_BEAMS x CH complex weights) and produces
// the matching column of T, i.e. one output per scan angle, then squares and
// sums the real and imaginary parts for direction finding. All
// NUM_BEAMS*CH complex multiplies happen in parallel, so a 1024-bin frame
// takes 1024 clocks.
//
// Scan matrix: after reset A holds steering weights for a uniform linear array
// with half-wavelength spacing, beam b at theta_b = -60 + 5*b degrees:
// A[b][n] = exp(+j*pi*n*sin(theta_b)), Q1.10, so a plane wave arriving from
// theta_b, whose element phases advance as exp(-j*pi*n*sin(theta)), adds up
// in phase in beam b. The w_* port overwrites single weights.
//
// Pipeline, three clocks: products, beam sums (scaled back by 2**BW_FRAC),
// power. out_* appear on the third clock edge after in_* are applied. The matrix product, its
// dimensions (25 x 8 times 8 x 1024), the 25 scan angles and the power
// output follow the published design; the array geometry, weight format and
// pipeline are choices of this design.
module beamformer
  import sa_pkg::*;
#(
  parameter int unsigned N     = FFT_N,
  parameter int unsigned CH    = NUM_CH,
  parameter int unsigned BEAMS = NUM_BEAMS,
  parameter int unsigned TW    = FFT_W + 5,    // beam output width
  parameter int unsigned PW    = 2 * TW        // power width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // scan matrix write port
  input  logic                     w_we,
  input  logic [$clog2(BEAMS)-1:0] w_beam,
  input  logic [$clog2(CH)-1:0]    w_elem,
  input  logic signed [BW_W-1:0]   w_re,
  input  logic signed [BW_W-1:0]   w_im,
  // calibrated data, one column per clock
  input  logic                     in_valid,
  input  logic                     in_last,
  input  logic [$clog2(N)-1:0]     in_bin,
  input  cplx16_t                  q [CH],
  // beamformed output
  output logic                     out_valid,
  output logic                     out_last,
  output logic [$clog2(N)-1:0]     out_bin,
  output logic signed [TW-1:0]     t_re [BEAMS],
  output logic signed [TW-1:0]     t_im [BEAMS],
  output logic [PW-1:0]            power [BEAMS]
);
  localparam int unsigned LN = $clog2(N);
  localparam int unsigned MW = FFT_W + BW_W;     // product width
  localparam real         PI = 3.14159265358979323846;

  // ----------------------------------------------------- default steering set
  logic signed [BW_W-1:0] a0_re [BEAMS][CH];
  logic signed [BW_W-1:0] a0_im [BEAMS][CH];
  for (genvar b = 0; b < BEAMS; b++) begin : g_b
    for (genvar n = 0; n < CH; n++) begin : g_n
      localparam real TH = (-60.0 + 5.0 * real'(b)) * PI / 180.0;
      localparam real PH = PI * real'(n) * $sin(TH);
      assign a0_re[b][n] = BW_W'(int'($floor($cos(PH) * real'(1 << BW_FRAC) + 0.5)));
      assign a0_im[b][n] = BW_W'(int'($floor($sin(PH) * real'(1 << BW_FRAC) + 0.5)));
    end
  end

  logic signed [BW_W-1:0] a_re [BEAMS][CH];
  logic signed [BW_W-1:0] a_im [BEAMS][CH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_re <= a0_re;
      a_im <= a0_im;
    end else if (w_we) begin
      a_re[w_beam][w_elem] <= w_re;
      a_im[w_beam][w_elem] <= w_im;
    end
  end

  // ------------------------------------------------------- stage 1: products
  logic signed [MW:0] p_re [BEAMS][CH];
  logic signed [MW:0] p_im [BEAMS][CH];
  logic               v1, l1;
  logic [LN-1:0]      b1;

  always_ff @(posedge clk) begin
    for (int b = 0; b < BEAMS; b++)
      for (int n = 0; n < CH; n++) begin
        logic signed [MW:0] rr, ii, ri, ir;
        rr = q[n].re * a_re[b][n];
        ii = q[n].im * a_im[b][n];
        ri = q[n].re * a_im[b][n];
        ir = q[n].im * a_re[b][n];
        p_re[b][n] <= rr - ii;
        p_im[b][n] <= ri + ir;
      end
  end

  // ------------------------------------------------------ stage 2: beam sums
  logic signed [TW-1:0] s_re [BEAMS];
  logic signed [TW-1:0] s_im [BEAMS];
  logic                 v2, l2;
  logic [LN-1:0]        b2;

  always_ff @(posedge clk) begin
    for (int b = 0; b < BEAMS; b++) begin
      logic signed [MW+$clog2(CH)+1:0] ar, ai;
      ar = '0;
      ai = '0;
      for (int n = 0; n < CH; n++) begin
        ar += (MW+$clog2(CH)+2)'(p_re[b][n]);
        ai += (MW+$clog2(CH)+2)'(p_im[b][n]);
      end
      s_re[b] <= TW'((ar + (1 <<< (BW_FRAC - 1))) >>> BW_FRAC);
      s_im[b] <= TW'((ai + (1 <<< (BW_FRAC - 1))) >>> BW_FRAC);
    end
  end

  // ---------------------------------------------------------- stage 3: power
  always_ff @(posedge clk) begin
    for (int b = 0; b < BEAMS; b++) begin
      logic signed [PW-1:0] r2, i2;
      r2 = s_re[b] * s_re[b];
      i2 = s_im[b] * s_im[b];
      power[b] <= PW'(unsigned'(r2)) + PW'(unsigned'(i2));
      t_re[b]  <= s_re[b];
      t_im[b]  <= s_im[b];
    end
  end

  // ------------------------------------------------------------ side band
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; l1 <= 1'b0; b1 <= '0;
      v2 <= 1'b0; l2 <= 1'b0; b2 <= '0;
      out_valid <= 1'b0; out_last <= 1'b0; out_bin <= '0;
    end else begin
      v1 <= in_valid;  l1 <= in_valid && in_last;  b1 <= in_bin;
      v2 <= v1;        l2 <= l1;                   b2 <= b1;
      out_valid <= v2; out_last <= l2;             out_bin <= b2;
    end
  end
endmodule
