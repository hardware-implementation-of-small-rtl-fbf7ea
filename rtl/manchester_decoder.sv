// manchester_decoder: turns the ADC samples of the data block into bits.
//
// Each MODE-S data bit lasts 1 us = SPB samples. A "1" is sent as a pulse in
// the first half of the bit and a "0" as a pulse in the second half. After
// start the block sums the first SPB/2 samples and the second SPB/2 samples of
// every bit and compares the two sums: first half larger gives 1, otherwise 0.
// Comparing sums instead of single samples makes the decision independent of
// the signal amplitude and tolerant of slow edges.
//
// Message length: the first bit of a MODE-S message is the top bit of the
// downlink format; formats 16 and above are 112 bits long, the others 56, so
// the first decoded bit selects the length.
//
// Interface: start is high for one clock together with the first sample
// (d_valid). One bit is produced per SPB samples, with bit_valid high for one
// clock right after the clock that took the bit's last sample; bit_last marks
// the message's final bit. busy is high from the clock after start until that
// final bit, and while busy a new start is ignored.
//
// The half-bit sum comparison, 16 samples per bit and the 56/112 lengths follow
// the source paper; taking the length from the first bit follows the MODE-S format
// and is this design's choice.
module manchester_decoder
  import modes_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_BIT = SPB
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  logic    d_valid,
  input  sample_t d_in,
  output logic    busy,
  output logic    bit_valid,
  output logic    bit_out,
  output logic    bit_last,
  output logic    is_long      // valid from the first bit_valid on
);

  localparam int unsigned HALF = SAMPLES_PER_BIT / 2;
  localparam int unsigned SW   = SAMPLE_W + $clog2(HALF + 1);
  localparam int unsigned CW   = $clog2(SAMPLES_PER_BIT);

  logic [CW-1:0] s_idx;     // sample index inside the bit
  logic [6:0]    b_idx;     // bit index inside the message
  logic [SW-1:0] sum_a, sum_b;
  logic [SW-1:0] sum_a_n, sum_b_n;
  logic [CW-1:0] s_cur;
  logic          take;      // this d_valid belongs to the message
  logic          bit_n;
  logic          long_n;

  assign take  = d_valid && (busy || start);
  assign s_cur = busy ? s_idx : '0;

  always_comb begin
    sum_a_n = (busy && s_cur != '0) ? sum_a : '0;
    sum_b_n = (busy && s_cur != '0) ? sum_b : '0;
    if (s_cur < CW'(HALF)) sum_a_n = sum_a_n + SW'(d_in);
    else                   sum_b_n = sum_b_n + SW'(d_in);
    bit_n  = sum_a_n > sum_b_n;
    long_n = (b_idx == '0) ? bit_n : is_long;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      s_idx     <= '0;
      b_idx     <= '0;
      sum_a     <= '0;
      sum_b     <= '0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
      bit_last  <= 1'b0;
      is_long   <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      bit_last  <= 1'b0;
      if (take) begin
        if (!busy) b_idx <= '0;
        busy  <= 1'b1;
        sum_a <= sum_a_n;
        sum_b <= sum_b_n;
        if (s_cur == CW'(SAMPLES_PER_BIT - 1)) begin
          s_idx     <= '0;
          bit_valid <= 1'b1;
          bit_out   <= bit_n;
          is_long   <= long_n;
          if (int'(b_idx) == (long_n ? MSG_LONG : MSG_SHORT) - 1) begin
            bit_last <= 1'b1;
            busy     <= 1'b0;
            b_idx    <= '0;
          end else begin
            b_idx <= b_idx + 1'b1;
          end
        end else begin
          s_idx <= s_cur + 1'b1;
        end
      end
    end
  end

endmodule
