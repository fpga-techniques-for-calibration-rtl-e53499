// Channel correction: applies a calibration amplitude-phase pair to a stream
// of FFT bins.
//
// Each bin X[k] is multiplied by the channel's amplitude weight a_m (unsigned
// Q2.14) and rotated by exp(+j*Phi_m) for positive frequencies
// (k <= N/2) or exp(-j*Phi_m) for negative ones (k > N/2), so the corrected
// spectrum of a real signal stays conjugate-symmetric. The rotation uses the
// 12-bit sin/cos table and one complex multiplication (four real multiplies,
// two additions).
//
// Pipeline, two clocks: stage 1 reads the table with the signed phase and
// multiplies both parts by a_m; stage 2 does the complex multiply, rounds and
// saturates to W bits. out_* follow in_* two clocks later; in_bin and in_tag
// (a free side-band, e.g. the channel number) travel with the data. The order
// of operations follows the published design; the formats, rounding and
// saturation are choices of this design.
module cal_corrector #(
  parameter int unsigned N      = 1024,
  parameter int unsigned W      = 16,
  parameter int unsigned GAIN_W = 16,
  parameter int unsigned G_FRAC = 14,
  parameter int unsigned PH_W   = 10,
  parameter int unsigned LUT_W  = 12,
  parameter int unsigned TAG_W  = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [GAIN_W-1:0]    gain,
  input  logic [PH_W-1:0]      phase,
  input  logic                 in_valid,
  input  logic [$clog2(N)-1:0] in_bin,
  input  logic [TAG_W-1:0]     in_tag,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_bin,
  output logic [TAG_W-1:0]     out_tag,
  output logic signed [W-1:0]  out_re,
  output logic signed [W-1:0]  out_im
);
  localparam int unsigned LN    = $clog2(N);
  localparam int unsigned AW    = W + 2;           // amplitude-corrected width
  localparam int unsigned LFRAC = LUT_W - 1;

  // stage 1
  logic [PH_W-1:0]        ph_signed;
  logic signed [LUT_W-1:0] c1, s1;
  logic signed [AW-1:0]   ar1, ai1;
  logic                   v1;
  logic [LN-1:0]          b1;
  logic [TAG_W-1:0]       t1;

  assign ph_signed = (in_bin > LN'(N / 2)) ? PH_W'(-phase) : phase;

  sincos_lut #(.PH_W(PH_W), .LUT_W(LUT_W)) u_lut (
    .clk(clk), .phase(ph_signed), .cos_o(c1), .sin_o(s1));

  function automatic logic signed [AW-1:0] amp(input logic signed [W-1:0] x,
                                               input logic [GAIN_W-1:0] g);
    logic signed [W+GAIN_W+1:0] p;
    p = (W+GAIN_W+2)'(x) * $signed({2'b00, g}) + (W+GAIN_W+2)'(1 << (G_FRAC - 1));
    p = p >>> G_FRAC;
    if (p > (W+GAIN_W+2)'((1 << (AW - 1)) - 1))       return {1'b0, {(AW-1){1'b1}}};
    else if (p < -(W+GAIN_W+2)'(1 << (AW - 1)))       return {1'b1, {(AW-1){1'b0}}};
    else                                              return AW'(p);
  endfunction

  function automatic logic signed [W-1:0] sat(input logic signed [AW+LUT_W:0] v);
    logic signed [AW+LUT_W:0] s;
    s = (v + (AW+LUT_W+1)'(1 << (LFRAC - 1))) >>> LFRAC;
    if (s > (AW+LUT_W+1)'((1 << (W - 1)) - 1))        return {1'b0, {(W-1){1'b1}}};
    else if (s < -(AW+LUT_W+1)'(1 << (W - 1)))        return {1'b1, {(W-1){1'b0}}};
    else                                              return W'(s);
  endfunction

  logic signed [AW+LUT_W:0] pr, pi;   // complex product before rounding
  always_comb begin
    pr = ar1 * c1;
    pr = pr - ai1 * s1;
    pi = ar1 * s1;
    pi = pi + ai1 * c1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; b1 <= '0; t1 <= '0; ar1 <= '0; ai1 <= '0;
      out_valid <= 1'b0; out_bin <= '0; out_tag <= '0; out_re <= '0; out_im <= '0;
    end else begin
      v1  <= in_valid;
      b1  <= in_bin;
      t1  <= in_tag;
      ar1 <= amp(in_re, gain);
      ai1 <= amp(in_im, gain);
      // (ar + j ai)(c + j s)
      out_valid <= v1;
      out_bin   <= b1;
      out_tag   <= t1;
      out_re    <= sat(pr);
      out_im    <= sat(pi);
    end
  end
endmodule
