// Four-channel calibration block.
//
// One block serves four ADCs; two of them serve the eight-element array.
// Four capture RAMs take 1024 simultaneous samples of the four channels. A
// single 1024-point FFT is shared between them through a multiplexer: the
// channels are transformed one after the other. What happens to the spectrum
// depends on the command:
//   calibrate - the tone selector picks the calibration bin, the CORDIC
//               computes its magnitude and phase, and the pair leaves on the
//               meas_* port (to the calibration weight table);
//   correct   - every bin is multiplied by the channel's amplitude weight and
//               rotated by its phase (cal_corrector), and the result is stored
//               as complex data in the channel's output RAM.
// Once all four channels are corrected the block raises ready; a stream_go
// pulse then reads the four output RAMs in parallel, one frequency bin (one
// column of the calibrated data matrix) per clock, so that two blocks
// started together deliver all eight channels to the beamformer at once.
//
// Timing per channel: 1025 clocks to load the FFT, 1280 for the transform,
// 1024 to read the bins, plus a few clocks of pipeline; about 13.4k clocks for
// the four channels. Capture takes 1024 valid ADC samples; streaming takes
// 1024 clocks plus one of read latency. Commands are accepted only when idle
// or ready. The channel multiplexing, RAM structure and processing order
// follow the published design; the command interface, the handshake with the
// beamformer and the sequencing are choices of this design.
module cal_block
  import sa_pkg::*;
#(
  parameter int unsigned N      = FFT_N,
  parameter int unsigned BLK_ID = 0        // channels BLK_ID*4 .. BLK_ID*4+3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // ADC inputs
  input  logic                   adc_valid,
  input  logic signed [ADC_W-1:0] adc_data [CH_PER_BLK],
  // commands (one-clock pulses)
  input  logic                   cmd_capture,
  input  logic                   cmd_calibrate,
  input  logic                   cmd_correct,
  input  logic                   stream_go,
  // calibration configuration
  input  logic                   search,
  input  logic [$clog2(N)-1:0]   target_bin,
  input  cal_pair_t              pairs [CH_PER_BLK],
  // measured calibration pairs
  output logic                   meas_valid,
  output logic [$clog2(NUM_CH)-1:0] meas_ch,
  output logic [MAG_W-1:0]       meas_mag,
  output logic [PH_W-1:0]        meas_phase,
  output logic [$clog2(N)-1:0]   meas_bin,
  // status
  output logic                   busy,
  output logic                   captured,     // pulse: capture finished
  output logic                   cal_done,     // pulse: four pairs measured
  output logic                   ready,        // corrected data waiting
  // corrected data stream, one column per clock
  output logic                   out_valid,
  output logic                   out_last,
  output logic [$clog2(N)-1:0]   out_bin,
  output cplx16_t                out_data [CH_PER_BLK]
);
  localparam int unsigned LN = $clog2(N);
  localparam int unsigned LC = $clog2(CH_PER_BLK);

  typedef enum logic [3:0] {
    S_IDLE, S_CAPTURE, S_LOAD, S_FFT, S_READ, S_MEAS, S_DRAIN, S_NEXT, S_READY, S_STREAM
  } state_t;
  state_t state;

  logic          mode_cal;      // 1: calibrate, 0: correct
  logic [LC-1:0] ch;
  logic [LN:0]   cnt;

  // ---------------------------------------------------------- capture RAMs
  logic signed [ADC_W-1:0] cap_ram [CH_PER_BLK][N];
  logic signed [ADC_W-1:0] cap_q;
  logic [LN-1:0]           cap_raddr;

  always_ff @(posedge clk) begin
    if (state == S_CAPTURE && adc_valid)
      for (int c = 0; c < CH_PER_BLK; c++) cap_ram[c][cnt[LN-1:0]] <= adc_data[c];
    cap_q <= cap_ram[ch][cap_raddr];           // multiplexer in front of the FFT
  end

  // ------------------------------------------------------------ shared FFT
  logic          fft_load, fft_start, fft_busy, fft_done;
  logic [LN-1:0] fft_laddr, fft_raddr;
  logic signed [FFT_W-1:0] fft_re, fft_im;

  fft1024_r4 #(.N(N), .IN_W(ADC_W), .OUT_W(FFT_W)) u_fft (
    .clk(clk), .rst_n(rst_n),
    .load_en(fft_load), .load_addr(fft_laddr), .load_data(cap_q),
    .start(fft_start), .busy(fft_busy), .done(fft_done),
    .rd_addr(fft_raddr), .rd_re(fft_re), .rd_im(fft_im));

  // bins leave the FFT one clock after their address
  logic          bin_valid, bin_last;
  logic [LN-1:0] bin_idx;

  // ------------------------------------------------- calibration measurement
  logic          sel_valid;
  logic [LN-1:0] sel_bin;
  logic signed [FFT_W-1:0] sel_re, sel_im;
  logic          cor_done;

  tone_selector #(.N(N), .W(FFT_W)) u_sel (
    .clk(clk), .rst_n(rst_n), .search(search), .target_bin(target_bin),
    .in_valid(bin_valid && mode_cal), .in_last(bin_last), .in_bin(bin_idx),
    .in_re(fft_re), .in_im(fft_im),
    .sel_valid(sel_valid), .sel_bin(sel_bin), .sel_re(sel_re), .sel_im(sel_im));

  cordic_vectoring #(.W(FFT_W), .MAG_W(MAG_W), .PH_W(PH_W)) u_cordic (
    .clk(clk), .rst_n(rst_n), .start(sel_valid), .x_in(sel_re), .y_in(sel_im),
    .busy(), .done(cor_done), .mag(meas_mag), .phase(meas_phase));

  // ------------------------------------------------------------ correction
  logic          cc_valid;
  logic [LN-1:0] cc_bin;
  logic [LC-1:0] cc_tag;
  logic signed [FFT_W-1:0] cc_re, cc_im;

  cal_corrector #(.N(N), .W(FFT_W), .GAIN_W(GAIN_W), .G_FRAC(GAIN_FRAC),
                  .PH_W(PH_W), .LUT_W(LUT_W), .TAG_W(LC)) u_cor (
    .clk(clk), .rst_n(rst_n), .gain(pairs[ch].gain), .phase(pairs[ch].phase),
    .in_valid(bin_valid && !mode_cal), .in_bin(bin_idx), .in_tag(ch),
    .in_re(fft_re), .in_im(fft_im),
    .out_valid(cc_valid), .out_bin(cc_bin), .out_tag(cc_tag),
    .out_re(cc_re), .out_im(cc_im));

  // ------------------------------------------------------- output RAMs
  cplx16_t       out_ram [CH_PER_BLK][N];
  logic [LN-1:0] out_raddr;
  always_ff @(posedge clk) begin
    if (cc_valid) out_ram[cc_tag][cc_bin] <= '{re: cc_re, im: cc_im};
    for (int c = 0; c < CH_PER_BLK; c++) out_data[c] <= out_ram[c][out_raddr];
  end

  // ------------------------------------------------------------- sequencer
  always_comb begin
    fft_load  = (state == S_LOAD) && (cnt != '0);
    fft_laddr = LN'(cnt - 1'b1);
    cap_raddr = cnt[LN-1:0];
    fft_raddr = cnt[LN-1:0];
    out_raddr = cnt[LN-1:0];
  end

  assign busy  = (state != S_IDLE) && (state != S_READY);
  assign ready = (state == S_READY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; mode_cal <= 1'b0; ch <= '0; cnt <= '0;
      fft_start <= 1'b0; bin_valid <= 1'b0; bin_last <= 1'b0; bin_idx <= '0;
      meas_valid <= 1'b0; meas_ch <= '0; meas_bin <= '0;
      captured <= 1'b0; cal_done <= 1'b0;
      out_valid <= 1'b0; out_last <= 1'b0; out_bin <= '0;
    end else begin
      fft_start  <= 1'b0;
      bin_valid  <= 1'b0;
      bin_last   <= 1'b0;
      meas_valid <= 1'b0;
      captured   <= 1'b0;
      cal_done   <= 1'b0;
      out_valid  <= 1'b0;
      out_last   <= 1'b0;
      if (sel_valid) meas_bin <= sel_bin;
      unique case (state)
        S_IDLE, S_READY: begin
          cnt <= '0;
          ch  <= '0;
          if (cmd_capture)              state <= S_CAPTURE;
          else if (cmd_calibrate)       begin mode_cal <= 1'b1; state <= S_LOAD; end
          else if (cmd_correct)         begin mode_cal <= 1'b0; state <= S_LOAD; end
          else if (state == S_READY && stream_go) state <= S_STREAM;
        end
        S_CAPTURE: if (adc_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == (LN+1)'(N - 1)) begin
            captured <= 1'b1;
            state    <= S_IDLE;
          end
        end
        S_LOAD: begin                  // RAM read address cnt, FFT write address cnt-1
          cnt <= cnt + 1'b1;
          if (cnt == (LN+1)'(N)) begin
            cnt       <= '0;
            fft_start <= 1'b1;
            state     <= S_FFT;
          end
        end
        S_FFT: if (fft_done) state <= S_READ;
        S_READ: begin
          bin_valid <= 1'b1;
          bin_idx   <= cnt[LN-1:0];
          bin_last  <= (cnt == (LN+1)'(N - 1));
          cnt       <= cnt + 1'b1;
          if (cnt == (LN+1)'(N - 1)) begin
            cnt   <= '0;
            state <= mode_cal ? S_MEAS : S_DRAIN;
          end
        end
        S_MEAS: if (cor_done) begin
          meas_valid <= 1'b1;
          meas_ch    <= $bits(meas_ch)'(BLK_ID * CH_PER_BLK) + $bits(meas_ch)'(ch);
          state      <= S_NEXT;
        end
        S_DRAIN: begin                 // let the corrector pipeline empty
          cnt <= cnt + 1'b1;
          if (cnt == (LN+1)'(3)) begin
            cnt   <= '0;
            state <= S_NEXT;
          end
        end
        S_NEXT: begin
          if (ch == LC'(CH_PER_BLK - 1)) begin
            ch <= '0;
            if (mode_cal) begin cal_done <= 1'b1; state <= S_IDLE; end
            else          state <= S_READY;
          end else begin
            ch    <= ch + 1'b1;
            state <= S_LOAD;
          end
        end
        S_STREAM: begin                // RAM address cnt, data one clock later
          out_valid <= 1'b1;
          out_bin   <= cnt[LN-1:0];
          out_last  <= (cnt == (LN+1)'(N - 1));
          cnt       <= cnt + 1'b1;
          if (cnt == (LN+1)'(N - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
