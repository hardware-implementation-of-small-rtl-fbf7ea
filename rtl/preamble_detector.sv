// preamble_detector: sliding 128-sample window and integer preamble function.
//
// Every ADC sample (in_valid) is pushed into a queue of WIN registers; the
// oldest one drops out. Position k of the window holds the sample taken k
// sample periods after the oldest, so with a preamble aligned at the window
// start its four pulses sit in positions 0-7, 16-23, 56-63 and 72-79 and the
// other 96 positions hold the "0" level. For each new sample the block
// computes
//
//     F = sum(pulse positions)/32 - sum(other positions)/96
//
// i.e. the mean level of the pulse positions minus the mean level of the gaps.
// It is evaluated as (3*S1 - S0)/96 with integer division, and negative values
// are clamped to 0 so F fits the 8-bit port (its largest value is 255, a full
// scale preamble on a zero background). F is large only when the four pulses
// line up with the template, whatever the absolute signal amplitude.
//
// Shape check: F is also forced to 0 when the gaps average more than a quarter
// of the pulse level (4*mean_gap > mean_pulse, i.e. 4*S0 > 3*S1). A real
// preamble has nearly empty gaps, while the pulse-position coded data block
// of a reply fills about half of every microsecond, and bit patterns such as
// 1,1,x,0,0 put all four template pulses on data pulses with the gaps a third
// full. Without the check such data produces local maxima of F above any fixed
// threshold and starts the decoder in the middle of a message, which then
// overruns the next reply. In the same way F is forced to 0 unless every one
// of the four pulses carries at least half the average pulse energy
// (8*P_i >= S1 for each pulse sum P_i); otherwise the tail of a message, with
// its last two pulses on template pulses 1 and 2 and silence after it, passes
// for a preamble.
//
// Timing: F and the sample that produced it (data_out, the newest window
// entry) appear with f_valid one clock after in_valid, so one result per
// sample, computed within one sample period at 16 MHz.
//
// The window size, pulse positions, the 32/96 divisors and one result per
// sample follow the source paper. The minus sign between the two means, the
// clamping of negative values to 0, the shape check and the one-clock
// register are this design's choices.
module preamble_detector
  import modes_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    f_valid,
  output logic [7:0] f,
  output sample_t data_out
);

  localparam int unsigned WIN_LEN = WIN;

  sample_t win [WIN_LEN];
  sample_t nxt [WIN_LEN];

  logic [SAMPLE_W+7:0] s_pulse, s_gap;   // up to 32*255 and 96*255
  logic signed [SAMPLE_W+9:0] diff;      // 3*S1 - S0
  logic [SAMPLE_W+9:0] gap4, pulse3;     // 4*S0 and 3*S1 for the shape check
  logic [SAMPLE_W+2:0] s_p [4];          // sum of each pulse
  logic                all_pulses;
  logic [7:0] f_next;

  // Window as it will be once the new sample is in.
  always_comb begin
    for (int k = 0; k < WIN_LEN - 1; k++) nxt[k] = win[k+1];
    nxt[WIN_LEN-1] = in_data;
  end

  always_comb begin
    s_pulse = '0;
    s_gap   = '0;
    for (int k = 0; k < WIN_LEN; k++) begin
      if (is_pulse_pos(k)) s_pulse += (SAMPLE_W+8)'(nxt[k]);
      else                 s_gap   += (SAMPLE_W+8)'(nxt[k]);
    end
    all_pulses = 1'b1;
    for (int p = 0; p < 4; p++) begin
      s_p[p] = '0;
      for (int k = 0; k < PULSE_LEN; k++)
        s_p[p] += (SAMPLE_W+3)'(nxt[PULSE_POS[p] + k]);
      if ((SAMPLE_W+8)'({s_p[p], 3'b000}) < s_pulse) all_pulses = 1'b0;
    end
    diff = $signed({2'b00, s_pulse}) + $signed({1'b0, s_pulse, 1'b0})
         - $signed({2'b00, s_gap});
    gap4   = {s_gap, 2'b00};
    pulse3 = {2'b00, s_pulse} + {1'b0, s_pulse, 1'b0};
    if (diff <= 0 || gap4 > pulse3 || !all_pulses) f_next = '0;
    else                                           f_next = 8'(diff / 96);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < WIN_LEN; k++) win[k] <= '0;
      f_valid  <= 1'b0;
      f        <= '0;
      data_out <= '0;
    end else begin
      f_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < WIN_LEN; k++) win[k] <= nxt[k];
        f        <= f_next;
        data_out <= in_data;
      end
    end
  end

endmodule
