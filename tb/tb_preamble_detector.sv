// tb_preamble_detector: checks the preamble function against a software model.
//
// A queue of the last 128 samples is kept in the testbench. For every sample
// the expected F is the mean of the 32 pulse positions minus the mean of the
// 96 gap positions, floored, clamped at 0 (computed as (96*mean difference)
// with integer arithmetic from explicit position ranges), and 0 when the gap
// mean exceeds a quarter of the pulse mean or
// one pulse holds less than half the average pulse. Checked: F, the
// forwarded sample, and that f_valid comes exactly one clock after in_valid.
// Stimulus: random samples with idle clocks between some of them, then ideal
// preambles of several amplitudes, which must give F equal to the amplitude
// at the aligned sample.
`timescale 1ns/1ps
module tb_preamble_detector;
  import modes_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_data = 0;
  logic f_valid;
  logic [7:0] f, data_out;

  int checks = 0, failures = 0;
  int q[$];
  int exp_f, exp_d, exp_pending = 0;

  preamble_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_f();
    int s1 = 0, s0 = 0, d;
    int pp[4] = '{0, 16, 56, 72};
    for (int k = 0; k < 128; k++) begin
      if ((k < 8) || (k >= 16 && k < 24) || (k >= 56 && k < 64) || (k >= 72 && k < 80))
        s1 += q[k];
      else
        s0 += q[k];
    end
    d = 3 * s1 - s0;
    // shape check: gap mean above a quarter of the pulse mean gives 0
    if (s0 * 32 * 4 > s1 * 96) return 0;
    // every pulse at least half the average pulse
    foreach (pp[i]) begin
      int ps = 0;
      for (int k = pp[i]; k < pp[i] + 8; k++) ps += q[k];
      if (ps * 8 < s1) return 0;
    end
    return d <= 0 ? 0 : d / 96;
  endfunction

  task automatic push(input int v);
    in_valid <= 1; in_data <= 8'(v);
    q.push_back(v); void'(q.pop_front());
    exp_f = model_f(); exp_d = v;
    @(posedge clk);
    in_valid <= 0;
    #1;
    checks++;
    if (!f_valid || f != 8'(exp_f) || data_out != 8'(exp_d)) begin
      failures++;
      if (failures < 10)
        $display("mismatch: f_valid=%0b f=%0d exp %0d data=%0d exp %0d",
                 f_valid, f, exp_f, data_out, exp_d);
    end
  endtask

  bit env[];
  int peak_seen;

  initial begin
    for (int k = 0; k < 128; k++) q.push_back(0);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // random samples, sometimes with idle clocks in between
    for (int i = 0; i < 3000; i++) begin
      push($urandom_range(0, 255));
      if ($urandom_range(0, 3) == 0) begin
        @(posedge clk); #1;
        checks++;
        if (f_valid) begin failures++; $display("f_valid without sample"); end
      end
    end
    // ideal preambles on a zero background
    foreach (env[k]) ;
    for (int a = 50; a <= 255; a += 41) begin
      envelope('0, 0, env);
      for (int k = 0; k < 200; k++) push(0);
      peak_seen = 0;
      for (int k = 0; k < 128; k++) begin
        push(env[k] ? a : 0);
        if (k == 127) begin
          checks++;
          if (f != 8'(a)) begin failures++; $display("aligned F=%0d for amplitude %0d", f, a); end
        end
      end
      push(0);
      checks++;
      if (f >= 8'(a)) begin failures++; $display("F did not fall after alignment"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
