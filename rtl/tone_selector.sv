// Calibration-tone bin selector.
//
// Watches the stream of FFT bins of one channel and keeps one complex pair:
// in fixed mode (search = 0) the bin whose index equals target_bin, the bin
// occupied by the calibration tone; in search mode (search = 1) the bin with
// the largest energy re^2 + im^2 among the positive frequencies
// 1 .. N/2-1, which lets a swept tone calibrate wherever it happens to be.
//
// Interface: one bin per clock with in_valid, in_bin, in_re, in_im; in_last
// marks the final bin of the frame. One clock after the in_last bin, sel_valid
// pulses with sel_bin/sel_re/sel_im, which hold until the next frame ends. A
// new frame starts implicitly after in_last. Selection by target frequency and
// by largest energy follow the published design; the positive-frequency search
// window and the lowest-index tie rule are choices of this design.
module tone_selector #(
  parameter int unsigned N = 1024,
  parameter int unsigned W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 search,
  input  logic [$clog2(N)-1:0] target_bin,
  input  logic                 in_valid,
  input  logic                 in_last,
  input  logic [$clog2(N)-1:0] in_bin,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  output logic                 sel_valid,
  output logic [$clog2(N)-1:0] sel_bin,
  output logic signed [W-1:0]  sel_re,
  output logic signed [W-1:0]  sel_im
);
  localparam int unsigned LN = $clog2(N);

  logic [2*W:0]          best_e;
  logic [LN-1:0]         best_bin;
  logic signed [W-1:0]   best_re, best_im;
  logic                  have;      // a candidate was seen in this frame

  logic [2*W:0] energy;
  logic         in_window, take;
  always_comb begin
    logic signed [2*W-1:0] r2, i2;
    r2        = (2*W)'(in_re);
    i2        = (2*W)'(in_im);
    energy    = (2*W+1)'(r2 * r2) + (2*W+1)'(i2 * i2);
    in_window = (in_bin != '0) && (in_bin < LN'(N / 2));
    if (search) take = in_window && (!have || energy > best_e);
    else        take = (in_bin == target_bin);
  end

  logic [LN-1:0]       nb;       // selection including the current bin
  logic signed [W-1:0] nr, ni;
  always_comb begin
    nb = take ? in_bin : best_bin;
    nr = take ? in_re  : best_re;
    ni = take ? in_im  : best_im;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_e <= '0; best_bin <= '0; best_re <= '0; best_im <= '0; have <= 1'b0;
      sel_valid <= 1'b0; sel_bin <= '0; sel_re <= '0; sel_im <= '0;
    end else begin
      sel_valid <= 1'b0;
      if (in_valid) begin
        if (in_last) begin
          sel_valid <= 1'b1;
          sel_bin   <= nb;
          sel_re    <= nr;
          sel_im    <= ni;
          have      <= 1'b0;
        end else begin
          if (take) begin
            best_e <= energy; best_bin <= in_bin; best_re <= in_re; best_im <= in_im;
            have   <= 1'b1;
          end
        end
      end
    end
  end
endmodule
