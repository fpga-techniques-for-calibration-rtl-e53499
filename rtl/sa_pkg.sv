// Shared constants and types of the smart-antenna calibration / beamforming
// receiver and of the QRD-RLS weight processor.
//
// The numbers that follow the published design: eight antenna channels,
// 8-bit ADC samples, a 1024-point FFT with 16-bit outputs, four channels per
// calibration block, 10-bit calibration phase, 12-bit sin/cos table values and
// 25 scan angles (-60 to +60 degrees in 5 degree steps). The gain format
// (Q2.14) and the 12-bit scan-weight format are choices of this design.
package sa_pkg;

  localparam int unsigned NUM_CH      = 8;    // antenna channels
  localparam int unsigned CH_PER_BLK  = 4;    // ADCs per calibration block
  localparam int unsigned FFT_N       = 1024; // points per data stream
  localparam int unsigned ADC_W       = 8;    // ADC sample width
  localparam int unsigned FFT_W       = 16;   // FFT output width (re and im)
  localparam int unsigned PH_W        = 10;   // calibration phase width (2*pi = 1024)
  localparam int unsigned LUT_W       = 12;   // sin/cos table width
  localparam int unsigned GAIN_W      = 16;   // amplitude correction, Q2.14
  localparam int unsigned GAIN_FRAC   = 14;
  localparam int unsigned MAG_W       = 18;   // CORDIC magnitude width
  localparam int unsigned NUM_BEAMS   = 25;   // scan angles
  localparam int unsigned BW_W        = 12;   // scan-matrix weight width, Q1.10
  localparam int unsigned BW_FRAC     = 10;

  // Complex FFT-domain sample.
  typedef struct packed {
    logic signed [FFT_W-1:0] re;
    logic signed [FFT_W-1:0] im;
  } cplx16_t;

  // One calibration amplitude-phase pair.
  typedef struct packed {
    logic [GAIN_W-1:0] gain;   // unsigned Q2.14
    logic [PH_W-1:0]   phase;  // 2*pi = 2**PH_W
  } cal_pair_t;

endpackage
