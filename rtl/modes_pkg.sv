// modes_pkg: constants shared by the MODE-S receiver blocks.
//
// The receiver works on an 8-bit ADC sampled at 16 MHz. A MODE-S reply is an
// 8 us preamble of four 0.5 us pulses followed by 56 or 112 Manchester (pulse
// position) coded bits of 1 us each, so one bit is 16 samples and the
// preamble is 128 samples. These numbers, the pulse positions and the 56/112
// message lengths follow the MODE-S format. The CRC generator polynomial is
// the standard MODE-S 24-bit one (0xFFF409); its choice is the design's,
// the format only says that a checksum is carried.
package modes_pkg;

  localparam int unsigned SAMPLE_W   = 8;    // ADC word
  localparam int unsigned SPB        = 16;   // samples per 1 us data bit
  localparam int unsigned WIN        = 128;  // preamble window, 8 us
  localparam int unsigned PULSE_LEN  = 8;    // 0.5 us pulse
  localparam int unsigned MSG_LONG   = 112;
  localparam int unsigned MSG_SHORT  = 56;
  localparam int unsigned CRC_W      = 24;
  localparam logic [23:0] CRC_POLY   = 24'hFFF409;

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [MSG_LONG-1:0] msg_t;

  // Start sample of each preamble pulse inside the 128-sample window
  // (0, 1.0, 3.5 and 4.5 us).
  localparam int unsigned PULSE_POS [4] = '{0, 16, 56, 72};

  // True when window position k lies inside one of the four pulses.
  function automatic bit is_pulse_pos(input int unsigned k);
    bit r = 1'b0;
    for (int p = 0; p < 4; p++)
      if (k >= PULSE_POS[p] && k < PULSE_POS[p] + PULSE_LEN) r = 1'b1;
    return r;
  endfunction

  // One step of the MODE-S CRC: the message bit enters at the top.
  function automatic logic [23:0] crc_step(input logic [23:0] crc, input logic b);
    logic fb = crc[23] ^ b;
    return fb ? ((crc << 1) ^ CRC_POLY) : (crc << 1);
  endfunction

endpackage
