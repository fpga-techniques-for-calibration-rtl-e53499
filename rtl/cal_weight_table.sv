// Calibration weight table for the eight channels.
//
// Holds the measured amplitude and phase of the calibration tone in every
// channel and turns them into the correction pair applied during
// beamforming, relative to a reference channel:
//   gain_m  = mag_ref / mag_m        (unsigned Q2.14, saturated)
//   phase_m = theta_ref - theta_m    (modulo 2*pi, PH_W bits)
// so that a corrected channel has the reference channel's amplitude and phase.
//
// Interface: meas_valid writes one measurement (channel, magnitude, phase).
// A compute pulse then derives all pairs one channel after the other through
// a shared sequential divider (about 36 clocks per channel); done pulses when
// the new set is in place. The set in use changes only at that moment, so the
// correctors never see a half-updated set. After reset every channel has gain
// 1.0 and phase 0. Normalising against a reference channel follows the
// published design; the reference index, formats and the sequencing are
// choices of this design.
module cal_weight_table
  import sa_pkg::*;
#(
  parameter int unsigned CH     = NUM_CH,
  parameter int unsigned REF_CH = 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   meas_valid,
  input  logic [$clog2(CH)-1:0]  meas_ch,
  input  logic [MAG_W-1:0]       meas_mag,
  input  logic [PH_W-1:0]        meas_phase,
  input  logic                   compute,
  output logic                   busy,
  output logic                   done,
  output cal_pair_t              pairs [CH]
);
  localparam int unsigned NW = MAG_W + GAIN_FRAC + 2;
  localparam int unsigned DW = MAG_W + 1;

  logic [MAG_W-1:0] mag_m [CH];
  logic [PH_W-1:0]  ph_m  [CH];
  cal_pair_t        next_set [CH];

  logic [$clog2(CH)-1:0] idx;
  logic                  div_start, div_busy, div_done, div_zero;
  logic signed [NW-1:0]  quo;

  seq_divider #(.NW(NW), .DW(DW)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start),
    .num(NW'(mag_m[REF_CH]) << GAIN_FRAC), .den(DW'(mag_m[idx])),
    .busy(div_busy), .done(div_done), .quo(quo), .div_zero(div_zero));

  typedef enum logic [1:0] {IDLE, DIV, WAIT} state_t;
  state_t state;

  logic [GAIN_W-1:0] g;        // quotient saturated to the gain format
  always_comb begin
    if (div_zero || quo < 0 || quo > NW'((1 << GAIN_W) - 1)) g = '1;
    else                                                     g = GAIN_W'(quo);
  end

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; idx <= '0; div_start <= 1'b0; done <= 1'b0;
      for (int m = 0; m < CH; m++) begin
        mag_m[m] <= '0; ph_m[m] <= '0;
        pairs[m]    <= '{gain: GAIN_W'(1 << GAIN_FRAC), phase: '0};
        next_set[m] <= '{gain: GAIN_W'(1 << GAIN_FRAC), phase: '0};
      end
    end else begin
      div_start <= 1'b0;
      done      <= 1'b0;
      if (meas_valid && state == IDLE) begin
        mag_m[meas_ch] <= meas_mag;
        ph_m[meas_ch]  <= meas_phase;
      end
      unique case (state)
        IDLE: if (compute) begin
          idx       <= '0;
          div_start <= 1'b1;
          state     <= WAIT;
        end
        DIV: begin
          div_start <= 1'b1;
          state     <= WAIT;
        end
        WAIT: if (div_done) begin
          next_set[idx] <= '{gain: g, phase: ph_m[REF_CH] - ph_m[idx]};
          if (idx == $bits(idx)'(CH - 1)) begin
            for (int m = 0; m < CH - 1; m++) pairs[m] <= next_set[m];
            pairs[CH-1] <= '{gain: g, phase: ph_m[REF_CH] - ph_m[idx]};
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            idx   <= idx + 1'b1;
            state <= DIV;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
