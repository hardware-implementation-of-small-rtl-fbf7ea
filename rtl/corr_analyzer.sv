// corr_analyzer: picks the preamble out of the stream of F values.
//
// The preamble function F (see preamble_detector) peaks when a preamble is
// aligned with the window, but it also shows smaller local maxima when only
// some of the four pulses line up (for example pulses 1 and 2 landing on the
// template positions of pulses 3 and 4, 56 samples before the true peak).
// The analyzer therefore keeps the largest F seen so far as a candidate and
// accepts it only once HOLD further samples have passed without a larger
// value: that is the local maximum that marks the preamble. The candidate must
// reach THRESH. Values are ignored while the Manchester decoder is busy and
// for BLANK samples after it finishes: the delay line makes the decoder lag the
// window by HOLD-1 samples, so when it finishes the window still holds the
// tail of the message, whose pulses can look like part of a preamble.
//
// Data check: a preamble must be followed by a data block. When the candidate
// is due, the delay line holds the first HOLD-1 samples after it; each of the
// first CHK_BITS bits (16 samples) must sum to at least 4*F, half of what a
// pulse of the preamble's level gives (a 1 us bit always holds a 0.5 us
// pulse). Otherwise the candidate is dropped and reject pulses. This stops
// the end of a message ("1 1 x 0 0" and then silence) from being taken for a
// preamble when the decoder was not busy with that message.
//
// The sample stream is delayed by HOLD-1 samples, so when the candidate is
// accepted the sample leaving the delay line is the first one after the
// preamble, i.e. the first half of data bit 1. start is raised for one clock
// together with that sample (d_valid/d_out); start_value carries the F value
// of the accepted peak.
//
// Interface: one F value and one sample per f_valid, d_valid follows f_valid
// by one clock. Latency from the end of the preamble to start: HOLD samples
// plus one clock.
//
// Detecting a local maximum of F follows the source paper; the candidate/HOLD
// scheme, the threshold, the data check and their values are this design's
// choices.
module corr_analyzer
  import modes_pkg::*;
#(
  parameter int unsigned HOLD   = 80,  // samples a peak must stay unbeaten
  parameter logic [7:0]  THRESH = 8'd16,
  parameter int unsigned BLANK  = WIN - HOLD   // samples ignored after busy
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       f_valid,
  input  logic [7:0] f,
  input  sample_t    data_in,
  input  logic       busy,        // decoder is taking a message
  output logic       start,
  output logic       d_valid,
  output sample_t    d_out,
  output logic [7:0] start_value,
  output logic       reject       // candidate dropped: no data after it
);

  localparam int unsigned DLEN = HOLD - 1;
  localparam int unsigned CHK_BITS = 4;
  localparam int unsigned BSW = SAMPLE_W + $clog2(SPB);
  localparam int unsigned AW   = $clog2(HOLD + 1);

  // The data check reads CHK_BITS bits from the delay line.
  if (HOLD < 4 * SPB + 1) begin : g_hold_check
    $error("HOLD must be at least 65 samples");
  end

  sample_t        dl [DLEN];
  logic           cand_v;
  logic [7:0]     cand_f;
  logic [AW-1:0]  age;
  localparam int unsigned BW = $clog2(BLANK + 2);
  logic [BW-1:0]  blank;      // samples still to ignore after busy
  logic [BSW-1:0] bit_sum [CHK_BITS];
  logic           data_ok;

  // Energy of the first CHK_BITS bits after the candidate (valid when due).
  always_comb begin
    data_ok = 1'b1;
    for (int b = 0; b < CHK_BITS; b++) begin
      bit_sum[b] = '0;
      for (int k = 0; k < SPB; k++) bit_sum[b] += BSW'(dl[SPB * b + k]);
      if (bit_sum[b] < BSW'({cand_f, 2'b00})) data_ok = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DLEN; k++) dl[k] <= '0;
      cand_v      <= 1'b0;
      cand_f      <= '0;
      age         <= '0;
      blank       <= '0;
      start       <= 1'b0;
      reject      <= 1'b0;
      d_valid     <= 1'b0;
      d_out       <= '0;
      start_value <= '0;
    end else begin
      start   <= 1'b0;
      reject  <= 1'b0;
      d_valid <= f_valid;
      if (f_valid) begin
        d_out <= dl[0];
        for (int k = 0; k < DLEN - 1; k++) dl[k] <= dl[k+1];
        dl[DLEN-1] <= data_in;

        if (busy || blank != '0) begin
          cand_v <= 1'b0;
          blank  <= busy ? BW'(BLANK) : blank - 1'b1;
        end else if (f >= THRESH && (!cand_v || f > cand_f)) begin
          cand_v <= 1'b1;
          cand_f <= f;
          age    <= '0;
        end else if (cand_v) begin
          if (age == AW'(HOLD - 1)) begin
            start       <= data_ok;
            reject      <= !data_ok;
            start_value <= cand_f;
            cand_v      <= 1'b0;
          end else begin
            age <= age + 1'b1;
          end
        end
      end
    end
  end

endmodule
