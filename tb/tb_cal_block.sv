// Self-checking testbench of cal_block. Four channels carry the same
// calibration tone (bin 37) with different amplitudes and phases plus a
// little noise. The test captures 1024 samples, runs the calibrate command
// and compares the four measured magnitudes and phases with the known tone
// (magnitude = A*N/2 / 4 for the FFT's output scaling, phase = phi). It then
// loads correction pairs computed here from the known tones, runs the correct
// command, streams the result and checks that every channel now matches the
// reference channel at the tone bin and at its negative-frequency image, that
// the stream is 1024 consecutive bins, and the block's timing.
module tb_cal_block;
  import sa_pkg::*;
  localparam int  N    = 1024;
  localparam int  TONE = 37;
  localparam real PI   = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic adc_valid = 0;
  logic signed [7:0] adc_data [4];
  logic cmd_capture = 0, cmd_calibrate = 0, cmd_correct = 0, stream_go = 0;
  logic search = 0;
  logic [9:0] target_bin = 10'(TONE);
  cal_pair_t pairs [4];
  logic meas_valid;
  logic [2:0] meas_ch;
  logic [MAG_W-1:0] meas_mag;
  logic [PH_W-1:0] meas_phase;
  logic [9:0] meas_bin;
  logic busy, captured, cal_done, ready;
  logic out_valid, out_last;
  logic [9:0] out_bin;
  cplx16_t out_data [4];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cal_block #(.BLK_ID(1)) dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real amp [4], phi [4];
  int  mmag [4], mph [4];

  function automatic int wrap(input int p);
    p = p & 1023;
    return (p > 512) ? p - 1024 : p;
  endfunction

  initial begin
    int cyc, nstream;
    for (int c = 0; c < 4; c++) begin
      adc_data[c] = '0;
      pairs[c] = '{gain: 16'd16384, phase: '0};
      amp[c] = 60.0 + 15.0 * c;
      phi[c] = 2.0 * PI * real'($urandom_range(0, 1023)) / 1024.0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- capture, with gaps in adc_valid
    @(negedge clk); cmd_capture = 1;
    @(negedge clk); cmd_capture = 0;
    for (int n = 0; n < N; ) begin
      adc_valid = ($urandom_range(0, 4) != 0);
      for (int c = 0; c < 4; c++)
        adc_data[c] = 8'(int'($floor(amp[c] * $cos(2.0 * PI * TONE * n / N + phi[c]) + 0.5)) + int'($urandom_range(0, 4)) - 2);
      if (adc_valid) n++;
      @(negedge clk);
      checks++;
      if (captured != (n == N && adc_valid)) begin failures++; $display("FAIL captured at sample %0d", n); end
    end
    adc_valid = 0;
    // ---- calibrate
    @(negedge clk); cmd_calibrate = 1;
    @(negedge clk); cmd_calibrate = 0; cyc = 1;
    while (!cal_done) begin
      if (meas_valid) begin
        int c;
        c = int'(meas_ch) - 4;
        mmag[c] = int'(meas_mag); mph[c] = int'(meas_phase);
        checks++;
        if (c < 0 || c > 3) begin failures++; $display("FAIL meas_ch %0d", meas_ch); end
        else begin
          real em;
          int  ep;
          em = amp[c] * 128.0;
          ep = wrap(mph[c] - int'($floor(phi[c] / (2.0 * PI) * 1024.0 + 0.5)));
          checks += 2;
          if (real'(mmag[c]) > em * 1.01 + 3 || real'(mmag[c]) < em * 0.99 - 3) begin
            failures++; $display("FAIL ch %0d magnitude %0d expected %f", c, mmag[c], em);
          end
          if (ep > 2 || ep < -2) begin failures++; $display("FAIL ch %0d phase %0d", c, mph[c]); end
          checks++;
          if (meas_bin != 10'(TONE)) begin failures++; $display("FAIL meas_bin %0d", meas_bin); end
        end
      end
      @(negedge clk); cyc++;
    end
    checks++;
    if (cyc < 4 * 3300 || cyc > 4 * 3400) begin failures++; $display("FAIL calibrate took %0d clocks", cyc); end
    // ---- correction pairs relative to channel 0 of this block
    for (int c = 0; c < 4; c++) begin
      pairs[c].gain  = 16'((longint'(mmag[0]) << 14) / mmag[c]);
      pairs[c].phase = 10'(mph[0] - mph[c]);
    end
    @(negedge clk); cmd_correct = 1;
    @(negedge clk); cmd_correct = 0;
    while (!ready) @(negedge clk);
    @(negedge clk); stream_go = 1;
    @(negedge clk); stream_go = 0;
    nstream = 0;
    while (nstream < N) begin
      if (out_valid) begin
        checks++;
        if (int'(out_bin) != nstream || out_last != (nstream == N - 1)) begin
          failures++; $display("FAIL stream order at %0d", nstream);
        end
        if (nstream == TONE || nstream == N - TONE) begin
          real er, ei;
          er = amp[0] * 128.0 * $cos(phi[0]);
          ei = amp[0] * 128.0 * $sin(phi[0]) * ((nstream == TONE) ? 1.0 : -1.0);
          for (int c = 0; c < 4; c++) begin
            checks++;
            if (real'(out_data[c].re) > er + 0.02 * amp[0] * 128.0 || real'(out_data[c].re) < er - 0.02 * amp[0] * 128.0 ||
                real'(out_data[c].im) > ei + 0.02 * amp[0] * 128.0 || real'(out_data[c].im) < ei - 0.02 * amp[0] * 128.0) begin
              failures++;
              $display("FAIL corrected ch %0d bin %0d: %0d,%0d expected %f,%f", c, nstream, out_data[c].re, out_data[c].im, er, ei);
            end
          end
        end
        nstream++;
      end
      @(negedge clk);
    end
    @(negedge clk);
    checks++;
    if (busy || ready || out_valid) begin failures++; $display("FAIL not idle after stream"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
