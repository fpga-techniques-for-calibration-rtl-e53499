// End-to-end testbench of smart_antenna_top at its default sizes
// (1024-point streams, eight channels, 25 beams, 8-input QRD-RLS).
//
// Receiver: every channel has its own unknown gain and phase error. A
// calibration tone (bin 37, fed equally to all channels) is captured and
// measured twice, once with the fixed target bin and once with the
// largest-energy search; the resulting correction pairs must equal
// g_0/g_c and e_0 - e_c. Then a plane wave from +25 degrees (bin 80) is
// captured through the same channel errors, corrected and beamformed: the
// 25-degree beam must carry the most power at bin 80. A scan weight
// column is then rewritten so that beam 0 also points to +25 degrees, and the
// data are corrected and beamformed again.
// QRD-RLS: 60 rows of y = x . c_true + noise go into the array; the solved
// weights must match c_true. A solve requested while rows are still in the
// pipeline must wait, and solving an empty array must report singular.
// Every mechanism listed in the summary must occur at least once.
module tb_smart_antenna_top;
  import sa_pkg::*;
  localparam int  N = 1024, QN = 8;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic adc_valid = 0;
  logic signed [7:0] adc_data [NUM_CH];
  logic cmd_capture = 0, cmd_calibrate = 0, cmd_correct = 0, search = 0;
  logic [9:0] target_bin = 10'd37;
  logic busy, captured, cal_valid;
  cal_pair_t cal_pairs [NUM_CH];
  logic [9:0] cal_bin;
  logic bw_we = 0;
  logic [4:0] bw_beam = '0;
  logic [2:0] bw_elem = '0;
  logic signed [11:0] bw_re = '0, bw_im = '0;
  logic beam_valid, beam_last;
  logic [9:0] beam_bin;
  logic signed [20:0] beam_re [NUM_BEAMS], beam_im [NUM_BEAMS];
  logic [41:0] beam_power [NUM_BEAMS];
  logic qrd_clear = 0, qrd_valid = 0, qrd_ready, qrd_solve = 0, qrd_idle;
  logic signed [15:0] qrd_x [QN];
  logic signed [15:0] qrd_y = '0;
  logic w_valid, w_singular;
  logic signed [23:0] w_out [QN];

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  smart_antenna_top dut (.*);

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_capture, n_cal_fixed, n_cal_search, n_weight_set, n_meas_collision;
  int n_correct, n_stream_bins, n_weight_write, n_qrd_rows, n_qrd_flush_wait;
  int n_solve, n_singular;
  always @(posedge clk) if (rst_n && dut.hold_valid) n_meas_collision++;
  always @(posedge clk) if (rst_n && beam_valid) n_stream_bins++;

  real g [NUM_CH], e [NUM_CH];
  longint pw_bin [NUM_BEAMS];

  function automatic int wrap(input int p);
    p = p & 1023;
    return (p > 512) ? p - 1024 : p;
  endfunction

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1;
    @(negedge clk); s = 0;
  endtask

  // capture a tone at bin k, arriving from angle theta (degrees) through the
  // channel errors
  task automatic capture(input int k, input real theta);
    pulse(cmd_capture);
    for (int n = 0; n < N; n++) begin
      adc_valid = 1;
      for (int c = 0; c < NUM_CH; c++)
        adc_data[c] = 8'(int'($floor(100.0 * g[c] * $cos(2.0 * PI * k * n / N + e[c]
                      - PI * c * $sin(theta * PI / 180.0)) + 0.5)) + int'($urandom_range(0, 2)) - 1);
      @(negedge clk);
    end
    adc_valid = 0;
    checks++;
    if (busy) begin failures++; $display("FAIL busy after capture"); end
    n_capture++;
  endtask

  task automatic calibrate(input bit srch);
    search = srch;
    pulse(cmd_calibrate);
    while (!cal_valid) @(negedge clk);
    if (srch) n_cal_search++; else n_cal_fixed++;
    n_weight_set++;
    checks++;
    if (cal_bin != 10'd37) begin failures++; $display("FAIL calibration bin %0d", cal_bin); end
    for (int c = 0; c < NUM_CH; c++) begin
      real eg;
      int ep;
      eg = g[0] / g[c] * 16384.0;
      ep = wrap(int'(cal_pairs[c].phase) - int'($floor((e[0] - e[c]) / (2.0 * PI) * 1024.0 + 0.5)));
      checks += 2;
      if (real'(cal_pairs[c].gain) > eg * 1.02 || real'(cal_pairs[c].gain) < eg * 0.98) begin
        failures++; $display("FAIL ch %0d gain %0d expected %f", c, cal_pairs[c].gain, eg);
      end
      if (ep > 3 || ep < -3) begin failures++; $display("FAIL ch %0d phase off by %0d", c, ep); end
    end
  endtask

  // correct, stream and record the beam powers at bin k; returns the peak beam
  task automatic correct_and_beamform(input int k, output int peak);
    int nb;
    pulse(cmd_correct);
    n_correct++;
    nb = 0;
    while (nb < N) begin
      @(negedge clk);
      if (beam_valid) begin
        checks++;
        if (int'(beam_bin) != nb || beam_last != (nb == N - 1)) begin
          failures++; $display("FAIL beam stream order at %0d", nb);
        end
        if (nb == k) for (int b = 0; b < NUM_BEAMS; b++) pw_bin[b] = longint'(beam_power[b]);
        nb++;
      end
    end
    peak = 0;
    for (int b = 1; b < NUM_BEAMS; b++) if (pw_bin[b] > pw_bin[peak]) peak = b;
  endtask

  initial begin
    int peak;
    real c_true [QN];
    for (int c = 0; c < NUM_CH; c++) begin
      adc_data[c] = '0;
      g[c] = 0.6 + 0.4 * real'($urandom_range(0, 1000)) / 1000.0;
      e[c] = 2.0 * PI * real'($urandom_range(0, 1023)) / 1024.0;
    end
    for (int i = 0; i < QN; i++) qrd_x[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------------------------------------------------- receiver
    capture(37, 0.0);
    calibrate(1'b0);
    calibrate(1'b1);
    // plane wave from +25 degrees = beam 17, at bin 80
    capture(80, 25.0);
    correct_and_beamform(80, peak);
    checks++;
    if (peak != 17) begin failures++; $display("FAIL calibrated peak at beam %0d", peak); end
    // rewrite beam 0 to point at +25 degrees
    for (int n = 0; n < NUM_CH; n++) begin
      real ph;
      ph = PI * n * $sin(25.0 * PI / 180.0);
      @(negedge clk);
      bw_we = 1; bw_beam = 5'd0; bw_elem = 3'(n);
      bw_re = 12'(int'($floor($cos(ph) * 1024.0 + 0.5)));
      bw_im = 12'(int'($floor($sin(ph) * 1024.0 + 0.5)));
      n_weight_write++;
    end
    @(negedge clk); bw_we = 0;
    correct_and_beamform(80, peak);
    checks++;
    if (pw_bin[0] != pw_bin[17]) begin failures++; $display("FAIL rewritten beam 0: %0d vs %0d", pw_bin[0], pw_bin[17]); end

    // ----------------------------------------------------------- QRD-RLS
    for (int i = 0; i < QN; i++) c_true[i] = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
    for (int t = 0; t < 60; t++) begin
      real yv;
      yv = 0.0;
      for (int i = 0; i < QN; i++) begin
        qrd_x[i] = 16'(int'($urandom_range(0, 8000)) - 4000);
        yv += real'(qrd_x[i]) * c_true[i];
      end
      qrd_y = 16'(int'($floor(yv + 0.5)) + int'($urandom_range(0, 2)) - 1);
      qrd_valid = 1;
      @(posedge clk);
      while (!qrd_ready) @(posedge clk);
      @(negedge clk);
      n_qrd_rows++;
    end
    qrd_valid = 0;
    // solve at once: the request must wait for the pipeline to drain
    @(negedge clk); qrd_solve = 1;
    @(negedge clk); qrd_solve = 0;
    while (!w_valid) begin
      @(negedge clk);
      if (!qrd_idle && !w_valid) n_qrd_flush_wait++;
    end
    n_solve++;
    checks++;
    if (w_singular) begin failures++; $display("FAIL singular flag"); end
    for (int i = 0; i < QN; i++) begin
      real wv;
      wv = real'(w_out[i]) / 4096.0;
      checks++;
      if (wv - c_true[i] > 0.02 || wv - c_true[i] < -0.02) begin
        failures++; $display("FAIL w[%0d] = %f expected %f", i, wv, c_true[i]);
      end
    end
    // empty array: singular
    pulse(qrd_clear);
    pulse(qrd_solve);
    while (!w_valid) @(negedge clk);
    checks++;
    if (!w_singular) begin failures++; $display("FAIL empty array not singular"); end
    else n_singular++;

    // -------------------------------------------------------- mechanisms
    $display("mechanisms: capture=%0d cal_fixed=%0d cal_search=%0d weight_set=%0d meas_collision=%0d",
             n_capture, n_cal_fixed, n_cal_search, n_weight_set, n_meas_collision);
    $display("            correct=%0d beam_bins=%0d weight_write=%0d qrd_rows=%0d flush_wait=%0d solve=%0d singular=%0d",
             n_correct, n_stream_bins, n_weight_write, n_qrd_rows, n_qrd_flush_wait, n_solve, n_singular);
    checks++; if (n_capture == 0)        begin failures++; $display("FAIL no capture"); end
    checks++; if (n_cal_fixed == 0)      begin failures++; $display("FAIL no fixed-bin calibration"); end
    checks++; if (n_cal_search == 0)     begin failures++; $display("FAIL no search calibration"); end
    checks++; if (n_weight_set == 0)     begin failures++; $display("FAIL no weight set"); end
    checks++; if (n_meas_collision == 0) begin failures++; $display("FAIL no measurement collision"); end
    checks++; if (n_correct == 0)        begin failures++; $display("FAIL no correction"); end
    checks++; if (n_stream_bins != 2 * N) begin failures++; $display("FAIL %0d beam bins", n_stream_bins); end
    checks++; if (n_weight_write == 0)   begin failures++; $display("FAIL no weight write"); end
    checks++; if (n_qrd_rows == 0)       begin failures++; $display("FAIL no QRD rows"); end
    checks++; if (n_qrd_flush_wait == 0) begin failures++; $display("FAIL solve never waited"); end
    checks++; if (n_solve == 0)          begin failures++; $display("FAIL no solve"); end
    checks++; if (n_singular == 0)       begin failures++; $display("FAIL no singular case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
