// Eight-channel smart-antenna receiver back end, with the QRD-RLS adaptive
// weight processor beside it.
//
// Calibration and beamforming receiver. Eight ADC streams enter two
// four-channel calibration blocks. A common command set drives both:
//   capture    - 1024 samples of every channel go into the capture RAMs;
//   calibrate  - each block measures amplitude and phase of the calibration
//                tone in its four channels; when both have finished the top
//                starts the calibration weight table, which derives gain and
//                phase corrections relative to channel 0 and hands each block
//                its four pairs (cal_valid pulses when the new set is active);
//   correct    - both blocks transform and correct their channels; when both
//                are ready the top releases them together, so the eight
//                corrected channels stream in parallel, one frequency bin per
//                clock, into the beamformer, which delivers 25 scan-angle
//                outputs and their powers per bin.
// Measurements of the two blocks can arrive in the same clock; the second is
// held for one clock before it is written to the table.
//
// QRD-RLS weight processor. Rows of array data and a reference sample enter
// the triangular systolic array; a solve request runs back substitution on
// the array's R and u once the array is idle and returns the weight vector.
// The two parts share only clock and reset: the published design evaluates
// the adaptive processor as a separate technique and does not connect it to
// the scanning beamformer.
//
// The partitioning (two calibration blocks feeding one beamformer, data
// passed in parallel) follows the published design; the command interface,
// the automatic start of the weight computation and of the stream, and the
// solve handshake are choices of this design.
module smart_antenna_top
  import sa_pkg::*;
#(
  parameter int unsigned N    = FFT_N,   // points per data stream
  parameter int unsigned QN   = 8,       // QRD-RLS problem size
  parameter int unsigned Q_DW = 16,      // QRD input width
  parameter int unsigned Q_W  = 26,      // R and u width
  parameter int unsigned Q_WW = 24,      // weight width
  parameter int unsigned Q_WF = 12       // weight fraction bits
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // ---------------------------------------------------- receiver
  input  logic                      adc_valid,
  input  logic signed [ADC_W-1:0]   adc_data [NUM_CH],
  input  logic                      cmd_capture,
  input  logic                      cmd_calibrate,
  input  logic                      cmd_correct,
  input  logic                      search,
  input  logic [$clog2(N)-1:0]      target_bin,
  output logic                      busy,
  output logic                      captured,
  output logic                      cal_valid,
  output cal_pair_t                 cal_pairs [NUM_CH],
  output logic [$clog2(N)-1:0]      cal_bin,
  input  logic                      bw_we,
  input  logic [$clog2(NUM_BEAMS)-1:0] bw_beam,
  input  logic [$clog2(NUM_CH)-1:0] bw_elem,
  input  logic signed [BW_W-1:0]    bw_re,
  input  logic signed [BW_W-1:0]    bw_im,
  output logic                      beam_valid,
  output logic                      beam_last,
  output logic [$clog2(N)-1:0]      beam_bin,
  output logic signed [FFT_W+4:0]   beam_re [NUM_BEAMS],
  output logic signed [FFT_W+4:0]   beam_im [NUM_BEAMS],
  output logic [2*FFT_W+9:0]        beam_power [NUM_BEAMS],
  // ---------------------------------------------------- QRD-RLS
  input  logic                      qrd_clear,
  input  logic                      qrd_valid,
  output logic                      qrd_ready,
  input  logic signed [Q_DW-1:0]    qrd_x [QN],
  input  logic signed [Q_DW-1:0]    qrd_y,
  input  logic                      qrd_solve,
  output logic                      qrd_idle,
  output logic                      w_valid,
  output logic                      w_singular,
  output logic signed [Q_WW-1:0]    w_out [QN]
);
  // ------------------------------------------------------ calibration blocks
  localparam int unsigned NB = NUM_CH / CH_PER_BLK;

  logic                      b_meas_valid [NB];
  logic [$clog2(NUM_CH)-1:0] b_meas_ch    [NB];
  logic [MAG_W-1:0]          b_meas_mag   [NB];
  logic [PH_W-1:0]           b_meas_phase [NB];
  logic [$clog2(N)-1:0]      b_meas_bin   [NB];
  logic                      b_busy [NB], b_captured [NB], b_cal_done [NB], b_ready [NB];
  logic                      b_out_valid [NB], b_out_last [NB];
  logic [$clog2(N)-1:0]      b_out_bin [NB];
  cplx16_t                   b_out [NB][CH_PER_BLK];
  logic                      stream_go;
  cal_pair_t                 pairs [NUM_CH];

  for (genvar b = 0; b < NB; b++) begin : g_blk
    logic signed [ADC_W-1:0] adc_b   [CH_PER_BLK];
    cal_pair_t               pairs_b [CH_PER_BLK];
    for (genvar c = 0; c < CH_PER_BLK; c++) begin : g_ch
      assign adc_b[c]   = adc_data[b * CH_PER_BLK + c];
      assign pairs_b[c] = pairs[b * CH_PER_BLK + c];
    end
    cal_block #(.N(N), .BLK_ID(b)) u_cal (
      .clk(clk), .rst_n(rst_n),
      .adc_valid(adc_valid), .adc_data(adc_b),
      .cmd_capture(cmd_capture), .cmd_calibrate(cmd_calibrate), .cmd_correct(cmd_correct),
      .stream_go(stream_go),
      .search(search), .target_bin(target_bin), .pairs(pairs_b),
      .meas_valid(b_meas_valid[b]), .meas_ch(b_meas_ch[b]), .meas_mag(b_meas_mag[b]),
      .meas_phase(b_meas_phase[b]), .meas_bin(b_meas_bin[b]),
      .busy(b_busy[b]), .captured(b_captured[b]), .cal_done(b_cal_done[b]), .ready(b_ready[b]),
      .out_valid(b_out_valid[b]), .out_last(b_out_last[b]), .out_bin(b_out_bin[b]),
      .out_data(b_out[b]));
  end

  // ----------------------------------------- measurement merge and weight table
  logic                      m_valid, hold_valid;
  logic [$clog2(NUM_CH)-1:0] m_ch, hold_ch;
  logic [MAG_W-1:0]          m_mag, hold_mag;
  logic [PH_W-1:0]           m_phase, hold_phase;
  logic [NB-1:0]             cal_seen;
  logic                      compute, wt_busy;

  always_comb begin
    m_valid = 1'b0; m_ch = b_meas_ch[0]; m_mag = b_meas_mag[0]; m_phase = b_meas_phase[0];
    if (hold_valid) begin
      m_valid = 1'b1; m_ch = hold_ch; m_mag = hold_mag; m_phase = hold_phase;
    end else if (b_meas_valid[0]) begin
      m_valid = 1'b1;
    end else if (b_meas_valid[1]) begin
      m_valid = 1'b1; m_ch = b_meas_ch[1]; m_mag = b_meas_mag[1]; m_phase = b_meas_phase[1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_valid <= 1'b0; hold_ch <= '0; hold_mag <= '0; hold_phase <= '0;
      cal_seen <= '0; compute <= 1'b0; stream_go <= 1'b0; cal_bin <= '0;
    end else begin
      compute   <= 1'b0;
      stream_go <= 1'b0;
      // a block-1 measurement that collides with another one waits a clock
      hold_valid <= b_meas_valid[1] && (hold_valid || b_meas_valid[0]);
      if (b_meas_valid[1]) begin
        hold_ch <= b_meas_ch[1]; hold_mag <= b_meas_mag[1]; hold_phase <= b_meas_phase[1];
      end
      if (b_meas_valid[0] && b_meas_ch[0] == '0) cal_bin <= b_meas_bin[0];
      // weight computation once both blocks have measured (after the last write)
      if (cal_seen == '1 && !hold_valid) begin
        compute  <= 1'b1;
        cal_seen <= '0;
      end else begin
        for (int b = 0; b < NB; b++) if (b_cal_done[b]) cal_seen[b] <= 1'b1;
      end
      // release both blocks together
      if (b_ready[0] && b_ready[1] && !stream_go) stream_go <= 1'b1;
    end
  end

  cal_weight_table #(.CH(NUM_CH), .REF_CH(0)) u_wt (
    .clk(clk), .rst_n(rst_n),
    .meas_valid(m_valid), .meas_ch(m_ch), .meas_mag(m_mag), .meas_phase(m_phase),
    .compute(compute), .busy(wt_busy), .done(cal_valid), .pairs(pairs));

  assign cal_pairs = pairs;
  assign captured  = b_captured[0];
  assign busy      = b_busy[0] || b_busy[1] || wt_busy || (cal_seen != '0);

  // -------------------------------------------------------------- beamformer
  cplx16_t column [NUM_CH];
  always_comb
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < CH_PER_BLK; c++) column[b * CH_PER_BLK + c] = b_out[b][c];

  beamformer #(.N(N), .CH(NUM_CH), .BEAMS(NUM_BEAMS), .TW(FFT_W + 5)) u_bf (
    .clk(clk), .rst_n(rst_n),
    .w_we(bw_we), .w_beam(bw_beam), .w_elem(bw_elem), .w_re(bw_re), .w_im(bw_im),
    .in_valid(b_out_valid[0]), .in_last(b_out_last[0]), .in_bin(b_out_bin[0]), .q(column),
    .out_valid(beam_valid), .out_last(beam_last), .out_bin(beam_bin),
    .t_re(beam_re), .t_im(beam_im), .power(beam_power));

  // both halves of a column must arrive together
  a_blocks_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    b_out_valid[0] == b_out_valid[1] && b_out_bin[0] == b_out_bin[1])
    else $error("calibration blocks out of step");

  // ---------------------------------------------------------------- QRD-RLS
  logic signed [Q_W-1:0] r_mat [QN][QN];
  logic signed [Q_W-1:0] u_vec [QN];
  logic                  solve_pend, bs_start, bs_busy;

  qrd_array #(.N(QN), .DW(Q_DW), .W(Q_W)) u_qrd (
    .clk(clk), .rst_n(rst_n), .clear(qrd_clear),
    .in_valid(qrd_valid), .in_ready(qrd_ready), .x_in(qrd_x), .y_in(qrd_y),
    .idle(qrd_idle), .r_mat(r_mat), .u_vec(u_vec));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      solve_pend <= 1'b0; bs_start <= 1'b0;
    end else begin
      bs_start <= 1'b0;
      if (qrd_solve) solve_pend <= 1'b1;
      if ((solve_pend || qrd_solve) && qrd_idle && !qrd_valid && !bs_busy && !bs_start) begin
        bs_start   <= 1'b1;
        solve_pend <= 1'b0;
      end
    end
  end

  back_substitution #(.N(QN), .W(Q_W), .WW(Q_WW), .WF(Q_WF)) u_bs (
    .clk(clk), .rst_n(rst_n), .start(bs_start), .r_mat(r_mat), .u_vec(u_vec),
    .busy(bs_busy), .done(w_valid), .singular(w_singular), .w(w_out));

endmodule
