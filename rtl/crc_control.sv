// crc_control: assembles a decoded message and checks its MODE-S checksum.
//
// Bits from the Manchester decoder are shifted into a 112-bit register. While
// they arrive, the 24-bit MODE-S CRC (generator 0xFFF409) is computed serially
// over all bits except the last 24, which carry the parity field. When the
// last bit is in, the syndrome (computed CRC XOR received parity) is formed.
// A message is accepted when its syndrome is zero (extended squitter, all-call
// reply) or equal to one of the reference values held in a small table:
// MODE-S overlays the aircraft address on the parity of most replies, so the
// table holds the addresses of interest. The table is written through
// tbl_we/tbl_addr/tbl_data/tbl_valid.
//
// Interface: bit_valid/bit_in/bit_last/is_long come from the decoder. One
// clock after bit_last the syndrome is registered and one clock later the
// result is out: msg_valid (accepted, handed to the output block with msg,
// msg_long and msg_score) or crc_bad. msg is left aligned: the first received
// bit is msg[111]; a 56-bit message occupies msg[111:56] and the rest is 0.
// msg_score is the preamble peak value (start_value) of that message.
//
// Checking a CRC against reference values in a table follows the source paper;
// the polynomial, the overlay rule, the table size and its write port are this
// design's choices.
module crc_control
  import modes_pkg::*;
#(
  parameter int unsigned TBL_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_valid,
  input  logic       bit_in,
  input  logic       bit_last,
  input  logic       is_long,
  input  logic [7:0] start_value,
  // reference table write port
  input  logic                          tbl_we,
  input  logic [$clog2(TBL_DEPTH)-1:0]  tbl_addr,
  input  logic [CRC_W-1:0]              tbl_data,
  input  logic                          tbl_valid,
  // result
  output logic             msg_valid,
  output msg_t             msg,
  output logic             msg_long,
  output logic [7:0]       msg_score,
  output logic             crc_bad,
  output logic [CRC_W-1:0] syndrome
);

  msg_t           sr;
  logic [6:0]     b_cnt;
  logic [CRC_W-1:0] crc;
  logic [CRC_W-1:0] tbl   [TBL_DEPTH];
  logic [TBL_DEPTH-1:0] tbl_v;

  msg_t           sr_n;
  logic [CRC_W-1:0] crc_cur;
  int unsigned    n_bits;

  // stage 2 registers
  logic           chk;
  msg_t           msg_q;
  logic           long_q;
  logic [7:0]     score_q;

  logic           match;

  always_comb begin
    sr_n    = {sr[MSG_LONG-2:0], bit_in};
    crc_cur = (b_cnt == '0) ? '0 : crc;
    n_bits  = is_long ? MSG_LONG : MSG_SHORT;
  end

  always_comb begin
    match = (syndrome == '0);
    for (int i = 0; i < TBL_DEPTH; i++)
      if (tbl_v[i] && tbl[i] == syndrome) match = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr        <= '0;
      b_cnt     <= '0;
      crc       <= '0;
      tbl_v     <= '0;
      for (int i = 0; i < TBL_DEPTH; i++) tbl[i] <= '0;
      chk       <= 1'b0;
      msg_q     <= '0;
      long_q    <= 1'b0;
      score_q   <= '0;
      syndrome  <= '0;
      msg_valid <= 1'b0;
      msg       <= '0;
      msg_long  <= 1'b0;
      msg_score <= '0;
      crc_bad   <= 1'b0;
    end else begin
      if (tbl_we) begin
        tbl[tbl_addr]   <= tbl_data;
        tbl_v[tbl_addr] <= tbl_valid;
      end

      // stage 1: collect bits and run the CRC
      chk <= 1'b0;
      if (bit_valid) begin
        sr <= sr_n;
        if (int'(b_cnt) < n_bits - CRC_W) crc <= crc_step(crc_cur, bit_in);
        else                              crc <= crc_cur;
        if (bit_last) begin
          b_cnt    <= '0;
          chk      <= 1'b1;
          syndrome <= crc_cur ^ sr_n[CRC_W-1:0];
          msg_q    <= is_long ? sr_n : {sr_n[MSG_SHORT-1:0], {(MSG_LONG-MSG_SHORT){1'b0}}};
          long_q   <= is_long;
          score_q  <= start_value;
        end else begin
          b_cnt <= b_cnt + 1'b1;
        end
      end

      // stage 2: compare with zero and the reference table
      msg_valid <= chk && match;
      crc_bad   <= chk && !match;
      if (chk && match) begin
        msg       <= msg_q;
        msg_long  <= long_q;
        msg_score <= score_q;
      end
    end
  end

endmodule
