// modes_tb_pkg: reference models shared by the receiver testbenches.
//
// crc_ref computes the MODE-S parity of the first n-24 bits of a message by
// plain polynomial long division (generator 1_FFF409, 25 bits), a different
// method from the bit-serial register in the RTL. make_msg builds a message of
// n bits with random data and a correct (or address-overlaid) parity field.
// The waveform helpers turn a message into 16 MHz ADC samples: preamble
// pulses at 0, 1.0, 3.5 and 4.5 us, then pulse-position coded bits, with a
// given pulse amplitude, an optional 3-tap smoothing of the edges and
// optional uniform noise.
package modes_tb_pkg;

  typedef logic [111:0] msg_t;

  // Parity of bits m[111 -: n-24] (message left aligned in m).
  function automatic logic [23:0] crc_ref(input msg_t m, input int n);
    logic [136:0] r;
    logic [24:0]  g = 25'h1FFF409;
    int nd = n - 24;
    r = '0;
    // dividend = data bits followed by 24 zeros, right aligned in r
    for (int i = 0; i < nd; i++) r[nd + 23 - i] = m[111 - i];
    for (int i = nd + 23; i >= 24; i--)
      if (r[i]) r[i -: 25] = r[i -: 25] ^ g;
    return r[23:0];
  endfunction

  // Random message with downlink format df; parity = crc ^ overlay.
  function automatic msg_t make_msg(input logic [4:0] df, input logic [23:0] overlay);
    msg_t m;
    int n = df[4] ? 112 : 56;
    m = '0;
    for (int i = 0; i < 4; i++) m[32*i +: 32] = $urandom;
    m[111 -: 5] = df;
    if (n == 56) m[55:0] = '0;
    m[112 - n +: 24] = crc_ref(m, n) ^ overlay;
    return m;
  endfunction

  // 0/1 envelope of a transmission: preamble (128 samples) followed by n bits
  // of 16 samples; element k is 1 where a pulse is on. With jit > 0 the start
  // and the width of each preamble pulse move by up to +-jit samples.
  function automatic void envelope(input msg_t m, input int n, ref bit env[],
                                   input int jit = 0);
    int pos[4] = '{0, 16, 56, 72};
    int s, w;
    env = new[128 + 16 * n];
    foreach (env[k]) env[k] = 1'b0;
    for (int p = 0; p < 4; p++) begin
      s = pos[p] + ((jit > 0) ? $urandom_range(0, 2 * jit) - jit : 0);
      w = 8 + ((jit > 0) ? $urandom_range(0, 2 * jit) - jit : 0);
      if (s < 0) s = 0;
      for (int k = s; k < s + w; k++) env[k] = 1;
    end
    for (int b = 0; b < n; b++)
      for (int k = 0; k < 8; k++)
        env[128 + 16 * b + (m[111 - b] ? k : 8 + k)] = 1;
  endfunction

endpackage
