// Self-checking testbench of tone_selector: frames of random bins with a
// planted tone. Fixed mode must return the target bin's pair; search mode
// must return the strongest positive-frequency bin and ignore a stronger DC
// bin and a stronger negative-frequency bin. Checks the one-clock delay.
module tb_tone_selector;
  localparam int N = 1024;
  logic clk = 0, rst_n = 0;
  logic search = 0;
  logic [9:0] target_bin = '0;
  logic in_valid = 0, in_last = 0;
  logic [9:0] in_bin = '0;
  logic signed [15:0] in_re = '0, in_im = '0;
  logic sel_valid;
  logic [9:0] sel_bin;
  logic signed [15:0] sel_re, sel_im;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tone_selector dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fr [N], fi [N];

  task automatic frame(input bit s, input int tgt, input int exp_bin);
    search = s; target_bin = 10'(tgt);
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      in_valid = 1; in_last = (k == N - 1); in_bin = 10'(k);
      in_re = 16'(fr[k]); in_im = 16'(fi[k]);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    checks++;
    if (!sel_valid) begin failures++; $display("FAIL no sel_valid"); end
    checks++;
    if (sel_bin != 10'(exp_bin) || sel_re != 16'(fr[exp_bin]) || sel_im != 16'(fi[exp_bin])) begin
      failures++; $display("FAIL mode %0d: bin %0d expected %0d", s, sel_bin, exp_bin);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      int peak;
      peak = $urandom_range(1, N / 2 - 1);
      for (int k = 0; k < N; k++) begin
        fr[k] = int'($urandom_range(0, 400)) - 200;
        fi[k] = int'($urandom_range(0, 400)) - 200;
      end
      fr[peak] = -30000; fi[peak] = 20000;
      fr[0] = 32767; fi[0] = 32767;                  // DC, outside the window
      fr[N - peak] = 32767; fi[N - peak] = -32768;   // negative frequency
      frame(1'b1, 0, peak);
      frame(1'b0, (peak * 7) % N, (peak * 7) % N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
