// tb_msg_output: checks the byte framing, the handshake and the drop policy.
//
// Random 56- and 112-bit messages are offered; the host side takes bytes with
// a random ready pattern. Each frame must be: score byte, then the message
// bytes most significant first (7 or 14), out_last on the final byte, and
// out_data held while out_valid waits for out_ready. A message offered while a
// frame is still waiting must be dropped with overflow, and the frame in
// progress must come out unchanged.
`timescale 1ns/1ps
module tb_msg_output;
  import modes_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic msg_valid = 0, msg_long = 0;
  msg_t msg = '0;
  logic [7:0] msg_score = 0;
  logic out_valid, out_last, overflow;
  logic [7:0] out_data;
  logic out_ready = 0;

  int checks = 0, failures = 0;
  byte unsigned exp_q[$];
  bit           last_q[$];
  int n_overflow = 0, ready_pct = 70;

  msg_output dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host side
  always @(negedge clk) out_ready = ($urandom_range(0, 99) < ready_pct);

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected byte %h", out_data);
      end else begin
        if (out_data != exp_q[0] || out_last != last_q[0]) begin
          failures++;
          $display("byte %h last %0b, expected %h last %0b", out_data, out_last, exp_q[0], last_q[0]);
        end
        void'(exp_q.pop_front()); void'(last_q.pop_front());
      end
    end
    if (overflow) n_overflow++;
  end

  task automatic offer(input bit expect_drop);
    int n;
    msg_t m;
    m = '0;
    for (int i = 0; i < 4; i++) m[32*i +: 32] = $urandom;
    msg_long = $urandom;
    n = msg_long ? 112 : 56;
    if (!msg_long) m[55:0] = '0;
    msg = m; msg_score = 8'($urandom);
    msg_valid = 1;
    if (!expect_drop) begin
      exp_q.push_back(msg_score); last_q.push_back(0);
      for (int b = 0; b < n / 8; b++) begin
        exp_q.push_back(m[111 - 8*b -: 8]); last_q.push_back(b == n / 8 - 1);
      end
    end
    @(negedge clk);
    msg_valid = 0;
  endtask

  int ov0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < 200; r++) begin
      ready_pct = (r % 3 == 0) ? 100 : 40;
      offer(0);
      if (r % 5 == 4) begin
        // second message while the first frame is still pending
        ready_pct = 0;
        @(negedge clk);
        ov0 = n_overflow;
        offer(1);
        @(negedge clk);
        checks++;
        if (n_overflow != ov0 + 1) begin failures++; $display("no overflow"); end
        ready_pct = 60;
      end
      wait (exp_q.size() == 0);
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("out_valid after the frame"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
