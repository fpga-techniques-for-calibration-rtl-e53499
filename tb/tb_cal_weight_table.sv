// Self-checking testbench of cal_weight_table: checks the reset set (gain 1,
// phase 0), then writes random magnitudes and phases for the eight channels,
// triggers compute and compares every pair with floor(2**14*mag_ref/mag_m)
// (saturated) and theta_ref - theta_m modulo 1024. Also checks that the
// active set changes only when done pulses.
module tb_cal_weight_table;
  import sa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic meas_valid = 0;
  logic [2:0] meas_ch = '0;
  logic [MAG_W-1:0] meas_mag = '0;
  logic [PH_W-1:0] meas_phase = '0;
  logic compute = 0, busy, done;
  cal_pair_t pairs [NUM_CH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cal_weight_table dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mags [NUM_CH], phs [NUM_CH];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int m = 0; m < NUM_CH; m++) begin
      checks++;
      if (pairs[m].gain != 16'd16384 || pairs[m].phase != '0) begin
        failures++; $display("FAIL reset pair %0d", m);
      end
    end
    for (int t = 0; t < 5; t++) begin
      int cyc;
      cal_pair_t prev_set [NUM_CH];
      for (int m = 0; m < NUM_CH; m++) begin
        mags[m] = $urandom_range(2000, 60000);
        if (t == 4 && m == 5) mags[m] = 100;       // saturating gain
        phs[m]  = $urandom_range(0, 1023);
        @(negedge clk);
        meas_valid = 1; meas_ch = 3'(m); meas_mag = MAG_W'(mags[m]); meas_phase = PH_W'(phs[m]);
      end
      @(negedge clk); meas_valid = 0;
      prev_set = pairs;
      compute = 1;
      @(negedge clk); compute = 0; cyc = 1;
      while (!done) begin
        @(negedge clk); cyc++;
        if (!done && pairs != prev_set) begin
          failures++; $display("FAIL set changed before done");
          break;
        end
      end
      checks++;
      if (cyc > 8 * 40) begin failures++; $display("FAIL took %0d clocks", cyc); end
      for (int m = 0; m < NUM_CH; m++) begin
        longint g;
        int p;
        g = (longint'(mags[0]) << 14) / mags[m];
        if (g > 65535) g = 65535;
        p = (phs[0] - phs[m]) & 1023;
        checks++;
        if (longint'(pairs[m].gain) != g || int'(pairs[m].phase) != p) begin
          failures++;
          $display("FAIL ch %0d: gain %0d phase %0d expected %0d %0d", m, pairs[m].gain, pairs[m].phase, g, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
