// tb_corr_analyzer: checks peak selection and stream alignment of the analyzer.
//
// The F stream is written by hand; the sample stream carries the sample index
// in its low 7 bits (bit 7 set, so every bit of data looks strong), so the
// sample that leaves with start tells where the analyzer put the preamble end. Every sample out must be the one that entered HOLD-1 samples
// earlier. Cases:
//  1. a partial peak (40) 56 samples before the true one (200): one start,
//     HOLD samples after the true peak, on the sample right after it;
//  2. a peak below THRESH: no start;
//  3. a peak while busy: no start;
//  4. a peak followed by an equal value: the first one is taken;
//  5. two peaks more than HOLD apart: two starts;
//  6. a peak within BLANK samples after busy falls: ignored; one after: taken;
//  7. a peak followed by weak samples (no data block): reject, no start; the
//     same with only the fourth data bit weak: reject as well.
`timescale 1ns/1ps
module tb_corr_analyzer;
  localparam int HOLD = 80;

  logic clk = 0, rst_n = 0;
  logic f_valid = 0;
  logic [7:0] f = 0, data_in = 0;
  logic busy = 0;
  logic start, d_valid;
  logic [7:0] d_out, start_value;
  logic reject;
  int n_reject = 0;
  int weak_from = -1, weak_to = -1;   // samples sent with a low level
  logic [7:0] sent[$];                // every sample sent, in order

  int checks = 0, failures = 0;
  int n = 0;                 // index of the sample being sent
  int starts[$];             // sample index that came out with start
  int svals[$];
  int hist[$];

  corr_analyzer #(.HOLD(HOLD), .THRESH(8'd16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    // 6: blanking after busy (BLANK = 128 - HOLD = 48)
    quiet(20, 1); quiet(40); send(100); quiet(200);
    expect_starts("case 6a", '{}, '{});
    quiet(20, 1); quiet(50); p = n; send(100); quiet(200);
    expect_starts("case 6b", '{p + 1}, '{100});
    // 7: no data after the peak, then only bit 4 weak
    p = n; weak_from = p + 1; weak_to = p + 200;
    send(120); quiet(250);
    expect_starts("case 7a", '{}, '{});
    checks++;
    if (n_reject != 1) begin failures++; $display("case 7a: %0d rejects", n_reject); end
    p = n; weak_from = p + 1 + 48; weak_to = p + 1 + 64;
    send(120); quiet(250);
    expect_starts("case 7b", '{}, '{});
    checks++;
    if (n_reject != 2) begin failures++; $display("case 7b: %0d rejects", n_reject); end
    p = n; weak_from = p + 1 + 64; weak_to = p + 1 + 200;
    send(120); quiet(250);
    expect_starts("case 7c", '{p + 1}, '{120});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] exp_sample(input int i);
    return (i >= weak_from && i < weak_to) ? 8'(i & 7) : 8'(128 | (i & 127));
  endfunction

  always @(posedge clk) if (rst_n && reject) n_reject++;

  // output monitor
  int out_n = 0;
  always @(posedge clk) if (rst_n && d_valid) begin
    checks++;
    if (out_n >= HOLD - 1 && d_out != sent[out_n - (HOLD - 1)]) begin
      failures++;
      $display("delay line: got %0d expected %0d", d_out, sent[out_n - (HOLD - 1)]);
    end
    if (start) begin
      starts.push_back(out_n - (HOLD - 1));
      svals.push_back(start_value);
      // start must come exactly HOLD samples after the peak it reports
    end
    out_n++;
  end

  // inputs change on the falling edge, away from the sampling edge
  task automatic send(input int fv, input bit b = 0);
    f_valid = 1; f = 8'(fv); data_in = exp_sample(n); busy = b;
    sent.push_back(data_in);
    @(negedge clk);
    f_valid = 0;
    n++;
    if ($urandom_range(0, 4) == 0) @(negedge clk);
  endtask

  task automatic quiet(input int k, input bit b = 0);
    repeat (k) send(0, b);
  endtask

  task automatic expect_starts(input string what, input int exp[$], input int ev[$]);
    checks++;
    if (starts.size() != exp.size()) begin
      failures++;
      $display("%s: %0d starts, expected %0d", what, starts.size(), exp.size());
    end else
      foreach (exp[i]) begin
        checks++;
        if (starts[i] != exp[i] || svals[i] != ev[i]) begin
          failures++;
          $display("%s: start on sample %0d value %0d, expected sample %0d value %0d",
                   what, starts[i], svals[i], exp[i], ev[i]);
        end
      end
    starts.delete(); svals.delete();
  endtask

  int p;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    // 1: partial peak then true peak
    quiet(100);
    send(20); send(40); send(30);       // partial peak, sample n-2
    quiet(53);
    send(120); p = n; send(200); send(150); send(106);
    quiet(200);
    expect_starts("case 1", '{p + 1}, '{200});
    // 2: below threshold
    send(10); send(15); send(12);
    quiet(200);
    expect_starts("case 2", '{}, '{});
    // 3: while busy
    quiet(5, 1); send(100, 1); send(250, 1); send(50, 1); quiet(200, 1);
    quiet(200);
    expect_starts("case 3", '{}, '{});
    // 4: equal value later
    p = n; send(90); quiet(10); send(90); quiet(200);
    expect_starts("case 4", '{p + 1}, '{90});
    // 5: two peaks far apart
    p = n; send(70); quiet(150); send(60); quiet(200);
    expect_starts("case 5", '{p + 1, p + 1 + 151}, '{70, 60});
    // 6: blanking after busy (BLANK = 128 - HOLD = 48)
    quiet(20, 1); quiet(40); send(100); quiet(200);
    expect_starts("case 6a", '{}, '{});
    quiet(20, 1); quiet(50); p = n; send(100); quiet(200);
    expect_starts("case 6b", '{p + 1}, '{100});
    // 7: no data after the peak, then only bit 4 weak
    p = n; weak_from = p + 1; weak_to = p + 200;
    send(120); quiet(250);
    expect_starts("case 7a", '{}, '{});
    checks++;
    if (n_reject != 1) begin failures++; $display("case 7a: %0d rejects", n_reject); end
    p = n; weak_from = p + 1 + 48; weak_to = p + 1 + 64;
    send(120); quiet(250);
    expect_starts("case 7b", '{}, '{});
    checks++;
    if (n_reject != 2) begin failures++; $display("case 7b: %0d rejects", n_reject); end
    p = n; weak_from = p + 1 + 64; weak_to = p + 1 + 200;
    send(120); quiet(250);
    expect_starts("case 7c", '{p + 1}, '{120});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
