// modes_receiver: MODE-S reply receiver, ADC samples in, checked messages out.
//
// Chain (one block per stage, all running in parallel on the sample stream):
//   preamble_detector  128-sample window, preamble function F per sample
//   corr_analyzer      local maximum of F -> start, delayed sample stream
//   manchester_decoder 16 samples -> 1 bit, 56 or 112 bits per message
//   crc_control        message assembly, CRC, reference-table compare
//   msg_output         accepted messages out to the host as bytes
// The counters give the two figures of merit of a receiver: preambles
// detected (decoder starts) and messages correctly decoded (CRC accepted),
// plus messages rejected by the CRC, messages dropped at the output and
// preamble candidates dropped because no data block followed them.
//
// Interface: in_valid/in_data carry one 8-bit ADC sample per 62.5 ns (16 MHz);
// the clock may equal the sample rate or be faster. The reference table of
// crc_control is written through tbl_*. Output bytes use out_valid/out_ready.
// Latency from the end of a message on air to its first output byte is a few
// clocks; from the end of the preamble to the decoder start it is HOLD samples
// plus 2 clocks, and the stream is delayed by the same amount.
//
// The block structure follows the source paper's decoder diagram; parameter
// values that the source paper does not give are this design's choices.
module modes_receiver
  import modes_pkg::*;
#(
  parameter int unsigned HOLD      = 80,
  parameter logic [7:0]  THRESH    = 8'd16,
  parameter int unsigned TBL_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  sample_t    in_data,
  // reference table of crc_control
  input  logic                         tbl_we,
  input  logic [$clog2(TBL_DEPTH)-1:0] tbl_addr,
  input  logic [CRC_W-1:0]             tbl_data,
  input  logic                         tbl_valid,
  // host stream
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_last,
  input  logic       out_ready,
  // status
  output logic        busy,
  output logic [31:0] n_detected,
  output logic [31:0] n_decoded,
  output logic [31:0] n_crc_bad,
  output logic [31:0] n_dropped,
  output logic [31:0] n_no_data,     // preamble-like peaks with no data after them
  output logic [CRC_W-1:0] last_syndrome  // syndrome of the latest message
);

  logic       f_valid;
  logic [7:0] f;
  sample_t    pd_data;

  logic       start, d_valid;
  sample_t    d_out;
  logic [7:0] start_value;
  logic       reject;

  logic       bit_valid, bit_out, bit_last, is_long;

  logic       msg_valid, msg_long, crc_bad, overflow;
  msg_t       msg;
  logic [7:0] msg_score;

  preamble_detector u_pd (
    .clk, .rst_n, .in_valid, .in_data,
    .f_valid, .f, .data_out(pd_data)
  );

  corr_analyzer #(.HOLD(HOLD), .THRESH(THRESH)) u_ca (
    .clk, .rst_n, .f_valid, .f, .data_in(pd_data), .busy,
    .start, .d_valid, .d_out, .start_value, .reject
  );

  manchester_decoder u_md (
    .clk, .rst_n, .start, .d_valid, .d_in(d_out),
    .busy, .bit_valid, .bit_out, .bit_last, .is_long
  );

  crc_control #(.TBL_DEPTH(TBL_DEPTH)) u_crc (
    .clk, .rst_n, .bit_valid, .bit_in(bit_out), .bit_last, .is_long,
    .start_value,
    .tbl_we, .tbl_addr, .tbl_data, .tbl_valid,
    .msg_valid, .msg, .msg_long, .msg_score, .crc_bad, .syndrome(last_syndrome)
  );

  msg_output u_out (
    .clk, .rst_n, .msg_valid, .msg, .msg_long, .msg_score,
    .out_valid, .out_data, .out_last, .out_ready, .overflow
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_detected <= '0;
      n_decoded  <= '0;
      n_crc_bad  <= '0;
      n_dropped  <= '0;
      n_no_data  <= '0;
    end else begin
      if (start)          n_detected <= n_detected + 1;
      if (msg_valid)      n_decoded  <= n_decoded + 1;
      if (crc_bad)        n_crc_bad  <= n_crc_bad + 1;
      if (overflow)       n_dropped  <= n_dropped + 1;
      if (reject)         n_no_data  <= n_no_data + 1;
    end
  end

endmodule
