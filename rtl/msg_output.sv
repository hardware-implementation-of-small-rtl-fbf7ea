// msg_output: hands accepted messages to the host computer as bytes.
//
// A message accepted by crc_control is copied into a frame register and sent
// over an 8-bit valid/ready stream: first the preamble score of the message,
// then the message bytes, most significant (first received) byte first, 7
// bytes for a 56-bit and 14 for a 112-bit message. out_last marks the final
// byte. A byte moves when out_valid and out_ready are both high.
//
// While a frame is still being sent, a newly accepted message is dropped and
// overflow pulses for one clock. At 16 MHz a new message can arrive at most
// every 64 us or so, so with a host that takes one byte per clock this never
// happens; it only guards against a stalled host.
//
// The 8-bit output to the computer follows the source paper; the frame layout, the
// handshake and the drop policy are this design's choices.
module msg_output
  import modes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       msg_valid,
  input  msg_t       msg,
  input  logic       msg_long,
  input  logic [7:0] msg_score,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_last,
  input  logic       out_ready,
  output logic       overflow
);

  localparam int unsigned NB_LONG  = MSG_LONG / 8 + 1;   // score + 14
  localparam int unsigned NB_SHORT = MSG_SHORT / 8 + 1;  // score + 7

  logic [MSG_LONG+7:0] frame;
  logic [4:0]          left;    // bytes still to send, 0 = idle

  assign out_valid = (left != '0);
  assign out_data  = frame[MSG_LONG+7 -: 8];
  assign out_last  = (left == 5'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame    <= '0;
      left     <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= 1'b0;
      if (out_valid && out_ready) begin
        frame <= {frame[MSG_LONG-1:0], 8'h00};
        left  <= left - 1'b1;
      end
      if (msg_valid) begin
        if (left == '0 || (left == 5'd1 && out_ready)) begin
          frame <= {msg_score, msg};
          left  <= msg_long ? 5'(NB_LONG) : 5'(NB_SHORT);
        end else begin
          overflow <= 1'b1;
        end
      end
    end
  end

  // A frame is never restarted in the middle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (out_valid && !out_ready) |=> (out_valid && $stable(out_data)));

endmodule
