// tb_air_traffic: a dense stream of replies, like a recording of busy air.
//
// The receiver (default sizes) gets one long sample stream holding NTX
// transmissions of random type (DF17 112-bit or DF11 56-bit, all with correct
// parity) at random times, with the pulse level drawn from 50 to 100, the
// range typical of real signals, plus a few strong ones. About one in eight
// transmissions is placed so that it overlaps its predecessor (garbling).
// Overlapping waveforms add up. Edges are smoothed and noise is added.
//
// Checks: every output frame must be one of the transmitted messages (no false
// accept); every transmission that no other one disturbs (no overlap, and the
// previous one ended at least 200 samples earlier) must come out. The share of
// all transmissions that were detected and correctly decoded is printed, the
// figure by which such receivers are compared.
`timescale 1ns/1ps
module tb_air_traffic;
  import modes_tb_pkg::*;

  localparam int NTX = 1500;

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

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  msg_t tx_msg[NTX];
  int   tx_start[NTX], tx_len[NTX], tx_amp[NTX];
  bit   tx_clean[NTX], tx_seen[NTX];
  int   idx_of[msg_t];
  int   level[];

  // frame collector
  byte unsigned fr[$];
  int n_frames = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    fr.push_back(out_data);
    if (out_last) begin
      msg_t m;
      m = '0;
      for (int b = 1; b < fr.size(); b++) m[111 - 8*(b-1) -: 8] = fr[b];
      checks++;
      if (!idx_of.exists(m)) begin
        failures++;
        $display("frame %h matches no transmitted message", m);
      end else tx_seen[idx_of[m]] = 1;
      n_frames++;
      fr.delete();
    end
  end

  int v, t, total, n_clean, n_clean_seen, n_seen;
  bit env[];
  initial begin
    // place the transmissions
    t = 300;
    for (int i = 0; i < NTX; i++) begin
      do tx_msg[i] = make_msg($urandom_range(0, 1) ? 5'd17 : 5'd11, '0);
      while (idx_of.exists(tx_msg[i]));
      idx_of[tx_msg[i]] = i;
      tx_len[i] = 128 + 16 * (tx_msg[i][111] ? 112 : 56);
      tx_amp[i] = ($urandom_range(0, 9) == 0) ? $urandom_range(100, 255) : $urandom_range(50, 100);
      if (i > 0 && $urandom_range(0, 7) == 0)
        t = tx_start[i-1] + $urandom_range(0, tx_len[i-1] - 1);     // overlap
      else if (i > 0)
        t = tx_start[i-1] + tx_len[i-1] + $urandom_range(20, 600);
      tx_start[i] = t;
    end
    total = tx_start[NTX-1] + tx_len[NTX-1] + 500;
    for (int i = 0; i < NTX; i++) begin
      tx_clean[i] = 1;
      for (int j = (i > 3 ? i - 3 : 0); j < (i + 4 < NTX ? i + 4 : NTX); j++) if (j != i) begin
        if (tx_start[j] < tx_start[i] + tx_len[i] && tx_start[j] + tx_len[j] + 200 > tx_start[i])
          tx_clean[i] = 0;
      end
    end
    // build the waveform: sum of smoothed envelopes plus noise
    level = new[total + 2];
    foreach (level[k]) level[k] = 0;
    for (int i = 0; i < NTX; i++) begin
      envelope(tx_msg[i], tx_msg[i][111] ? 112 : 56, env);
      foreach (env[k]) if (env[k]) begin
        level[tx_start[i] + k]     += tx_amp[i] / 2;
        level[tx_start[i] + k - 1] += tx_amp[i] / 4;
        level[tx_start[i] + k + 1] += tx_amp[i] / 4;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < total; k++) begin
      v = level[k] + $urandom_range(0, 8);
      in_valid = 1; in_data = 8'(v > 255 ? 255 : v);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (200) @(negedge clk);

    n_clean = 0; n_clean_seen = 0; n_seen = 0;
    for (int i = 0; i < NTX; i++) begin
      if (tx_seen[i]) n_seen++;
      if (tx_clean[i]) begin
        n_clean++;
        checks++;
        if (tx_seen[i]) n_clean_seen++;
        else begin
          failures++;
          $display("undisturbed transmission %0d (amplitude %0d) not decoded", i, tx_amp[i]);
        end
      end
    end
    checks++;
    if (n_decoded != 32'(n_frames)) begin
      failures++; $display("n_decoded %0d but %0d frames", n_decoded, n_frames);
    end
    $display("transmissions %0d, undisturbed %0d (decoded %0d); detected %0d, decoded %0d (%0d%%), CRC rejects %0d",
             NTX, n_clean, n_clean_seen, n_detected, n_seen, 100 * n_seen / NTX, n_crc_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
