// tb_modes_receiver: end-to-end test of the receiver at its default sizes.
//
// Synthesises an ADC sample stream at one sample per clock (16 MHz): noise,
// then MODE-S transmissions (preamble + pulse-position coded data) with pulse
// amplitudes from 40 to 255, edges smoothed by a 3-tap filter and uniform
// noise on top. Each transmission is one of:
//   - a correct 112-bit extended squitter (DF17) or 56-bit reply (DF11);
//   - a reply whose parity is overlaid with an address held in the table
//     (accepted) or with an address not in the table (rejected);
//   - a message with a flipped bit (rejected by the CRC);
//   - a preamble too weak to pass the threshold (not detected);
//   - a preamble with no data block after it (candidate rejected);
//   - two messages while the host holds out_ready low (the second is dropped);
//   - a preamble whose pulses are shifted and widened or narrowed by up to one
//     sample (timing distortion), which must still be found.
// The output frames are compared byte by byte with the messages sent; the
// score byte must be at least the threshold. The counters must match. The
// first byte of each frame must come out no later than HOLD + 12 clocks after
// the last sample of the transmission. Each of these mechanisms is counted and
// a mechanism that never happened is a failure.
`timescale 1ns/1ps
module tb_modes_receiver;
  import modes_tb_pkg::*;

  localparam int HOLD = 80;          // the receiver's default
  localparam int THRESH = 16;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_data = 0;
  logic tbl_we = 0, tbl_valid = 0;
  logic [2:0] tbl_addr = 0;
  logic [23:0] tbl_data = 0;
  logic out_valid, out_last;
  logic [7:0] out_data;
  logic out_ready = 1;
  logic busy;
  logic [31:0] n_detected, n_decoded, n_crc_bad, n_dropped, n_no_data;
  logic [23:0] last_syndrome;

  modes_receiver dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_long = 0, m_short = 0, m_table = 0, m_crc_bad = 0, m_weak = 0, m_drop = 0, m_jitter = 0, m_nodata = 0;
  int exp_detected = 0, exp_decoded = 0, exp_bad = 0, exp_dropped = 0;
  int exp_total = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected frames
  msg_t exp_msg[$];
  int   exp_len[$];
  time  exp_end[$];            // time of the last sample of the transmission
  bit   hold_ready = 0;

  always @(negedge clk) out_ready = !hold_ready && ($urandom_range(0, 9) != 0);

  // frame collector
  byte unsigned fr[$];
  time t_first;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (fr.size() == 0) t_first = $time;
    fr.push_back(out_data);
    if (out_last) begin
      checks++;
      if (exp_msg.size() == 0) begin
        failures++; $display("unexpected frame");
      end else begin
        msg_t m;
        int n;
        time te;
        bit bad;
        m = exp_msg.pop_front();
        n = exp_len.pop_front();
        te = exp_end.pop_front();
        bad = (fr.size() != n / 8 + 1) || (fr[0] < THRESH);
        for (int b = 0; b < n / 8 && !bad; b++) bad = (fr[b + 1] != m[111 - 8*b -: 8]);
        if (bad) begin
          failures++;
          $display("frame mismatch: %0d bytes, expected message %h", fr.size(), m);
        end
        if (!hold_ready && te != 0) begin
          checks++;
          if (t_first > te + (HOLD + 12) * 10) begin
            failures++;
            $display("first byte %0d clocks after the end of the transmission", (t_first - te) / 10);
          end
        end
      end
      fr.delete();
    end
  end

  // one sample per clock, changed on the falling edge
  task automatic put(input int v);
    in_valid = 1; in_data = 8'(v < 0 ? 0 : (v > 255 ? 255 : v));
    @(negedge clk);
  endtask

  task automatic noise(input int k);
    repeat (k) put($urandom_range(0, 8));
  endtask

  // transmit m (left aligned) with pulse amplitude a
  task automatic transmit(input msg_t m, input int a, input int jit = 0);
    bit env[];
    int n = m[111] ? 112 : 56;
    int x[];
    envelope(m, n, env, jit);
    x = new[env.size() + 2];
    foreach (x[k]) x[k] = (k >= 1 && k <= env.size() && env[k - 1]) ? a : 0;
    for (int k = 1; k <= env.size(); k++)
      put((x[k - 1] + 2 * x[k] + x[k + 1]) / 4 + $urandom_range(0, 8));
  endtask

  task automatic preamble_only(input int a);
    bit env[];
    int x[];
    envelope('0, 0, env);
    x = new[env.size() + 2];
    foreach (x[k]) x[k] = (k >= 1 && k <= env.size() && env[k - 1]) ? a : 0;
    for (int k = 1; k <= env.size(); k++)
      put((x[k - 1] + 2 * x[k] + x[k + 1]) / 4 + $urandom_range(0, 8));
  endtask

  task automatic expect_frame(input msg_t m);
    exp_msg.push_back(m);
    exp_len.push_back(m[111] ? 112 : 56);
    exp_end.push_back(hold_ready ? 0 : $time - 5);  // edge that took the last sample
  endtask

  task automatic tbl_write(input int a, input logic [23:0] d);
    tbl_we = 1; tbl_addr = 3'(a); tbl_data = d; tbl_valid = 1;
    @(negedge clk);
    tbl_we = 0;
  endtask

  msg_t m;
  logic [23:0] addr;
  int amp;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    addr = 24'h3C6DD4;
    tbl_write(3, addr);
    noise(300);
    for (int r = 0; r < 80; r++) begin
      amp = 40 + ($urandom_range(0, 215));
      case (r % 8)
        0: begin      // correct long message
          m = make_msg(5'd17, '0);
          transmit(m, amp); expect_frame(m);
          exp_detected++; exp_decoded++; m_long++;
        end
        3: begin      // correct long message, distorted preamble
          m = make_msg(5'd17, '0);
          transmit(m, amp, 1); expect_frame(m);
          exp_detected++; exp_decoded++; m_long++; m_jitter++;
        end
        1, 5: begin   // correct short message
          m = make_msg(5'd11, '0);
          transmit(m, amp); expect_frame(m);
          exp_detected++; exp_decoded++; m_short++;
        end
        2: begin      // address overlay, known and unknown
          m = make_msg(r % 16 == 2 ? 5'd4 : 5'd20, addr);
          transmit(m, amp); expect_frame(m);
          exp_detected++; exp_decoded++; m_table++;
          noise(200);
          m = make_msg(5'd20, addr ^ 24'h000100);
          transmit(m, amp);
          exp_detected++; exp_bad++;
        end
        4: begin      // bit error
          m = make_msg(5'd17, '0);
          m[111 - $urandom_range(8, 100)] ^= 1'b1;
          transmit(m, amp);
          exp_detected++; exp_bad++; m_crc_bad++;
        end
        6: begin
          if (r % 16 == 6) begin   // weak preamble: below threshold
            m = make_msg(5'd17, '0);
            transmit(m, 12);
            m_weak++;
          end else begin           // preamble alone
            preamble_only(amp);
            m_nodata++;
          end
        end
        7: begin      // host stalled: second message dropped
          hold_ready = 1;
          m = make_msg(5'd11, '0);
          transmit(m, amp); expect_frame(m);
          exp_detected++; exp_decoded++;
          noise(200);
          m = make_msg(5'd17, '0);
          transmit(m, amp);
          exp_detected++; exp_decoded++; exp_dropped++; m_drop++;
          noise(150);
          hold_ready = 0;
        end
        default: ;
      endcase
      noise(150 + $urandom_range(0, 200));
    end
    noise(400);
    in_valid = 0;
    repeat (100) @(negedge clk);

    checks++;
    if (exp_msg.size() != 0) begin failures++; $display("%0d frames missing", exp_msg.size()); end
    checks++;
    if (n_detected != 32'(exp_detected) || n_decoded != 32'(exp_decoded) ||
        n_crc_bad != 32'(exp_bad) || n_dropped != 32'(exp_dropped) ||
        n_no_data != 32'(m_nodata)) begin
      failures++;
      $display("counters: detected %0d/%0d decoded %0d/%0d crc_bad %0d/%0d dropped %0d/%0d no_data %0d/%0d",
               n_detected, exp_detected, n_decoded, exp_decoded, n_crc_bad, exp_bad,
               n_dropped, exp_dropped, n_no_data, m_nodata);
    end
    $display("mechanisms: long %0d short %0d table %0d crc_reject %0d below_threshold %0d dropped %0d distorted_preamble %0d no_data %0d",
             m_long, m_short, m_table, m_crc_bad, m_weak, m_drop, m_jitter, m_nodata);
    if (m_long == 0 || m_short == 0 || m_table == 0 || m_crc_bad == 0 || m_weak == 0 || m_drop == 0 || m_jitter == 0 || m_nodata == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
