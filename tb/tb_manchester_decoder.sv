// tb_manchester_decoder: decodes random 56- and 112-bit messages from samples.
//
// Each bit is drawn as 16 samples: a pulse of amplitude A in the first half
// for a 1, in the second half for a 0, on a background of low-level noise and
// with the first and last sample of each pulse at half height (slow edges).
// The message's first bit chooses its length as in MODE-S (1: 112 bits).
// Checked for every bit: its value, that bit_valid comes one clock after the
// bit's 16th sample, bit_last on the final bit only, is_long, and that busy
// drops after the final bit. A start while busy must be ignored.
`timescale 1ns/1ps
module tb_manchester_decoder;
  logic clk = 0, rst_n = 0;
  logic start = 0, d_valid = 0;
  logic [7:0] d_in = 0;
  logic busy, bit_valid, bit_out, bit_last, is_long;

  int checks = 0, failures = 0;
  bit exp_bits[$];
  int exp_n;
  int got = 0;
  time t_sample = 0;   // time of the clock edge that took the last sample

  manchester_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && bit_valid) begin
    checks++;
    if (got >= exp_bits.size() || bit_out != exp_bits[got]) begin
      failures++;
      $display("bit %0d: got %0b", got, bit_out);
    end
    checks++;
    if ($time != t_sample + 10) begin
      failures++;
      $display("bit %0d: bit_valid %0t after its last sample", got, $time - t_sample);
    end
    checks++;
    if (bit_last != (got == exp_n - 1) || is_long != (exp_n == 112)) begin
      failures++;
      $display("bit %0d: bit_last=%0b is_long=%0b n=%0d", got, bit_last, is_long, exp_n);
    end
    got++;
  end

  task automatic sample(input int v, input bit st);
    d_valid = 1; d_in = 8'(v); start = st;
    @(negedge clk);
    t_sample = $time - 5;
    d_valid = 0; start = 0;
    if ($urandom_range(0, 3) == 0) @(negedge clk);
  endtask

  task automatic message(input int n, input int a);
    bit b;
    exp_bits.delete(); got = 0; exp_n = n;
    for (int i = 0; i < n; i++) begin
      b = (i == 0) ? (n == 112) : 1'($urandom);
      exp_bits.push_back(b);
    end
    for (int i = 0; i < n; i++)
      for (int k = 0; k < 16; k++) begin
        bit on = exp_bits[i] ? (k < 8) : (k >= 8);
        int lvl = $urandom_range(0, 6);
        if (on) lvl += (k % 8 == 0 || k % 8 == 7) ? a / 2 : a;
        // a second start in the middle of a message must be ignored
        sample(lvl > 255 ? 255 : lvl, (i == 0 && k == 0) || (i == 20 && k == 3));
      end
    repeat (5) sample(3, 0);
    checks++;
    if (got != n || busy) begin
      failures++;
      $display("message of %0d bits: %0d bits out, busy=%0b", n, got, busy);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < 12; r++) message((r % 2 == 1) ? 112 : 56, 30 + 20 * r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
