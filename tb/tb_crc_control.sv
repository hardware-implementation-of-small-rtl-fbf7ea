// tb_crc_control: checks message assembly, CRC and the reference table.
//
// Messages are made by modes_tb_pkg::make_msg, whose parity comes from a long
// division model. Cases: correct 112- and 56-bit messages (accepted, syndrome
// 0); a message with one data bit flipped (rejected); messages whose parity
// carries an address overlay (accepted only while that address is a valid
// table entry, syndrome equal to the address). Also checked: the message word,
// its length flag and score, and that the verdict comes 2 clocks after the
// last bit. One published extended squitter is included as a fixed vector.
`timescale 1ns/1ps
module tb_crc_control;
  import modes_tb_pkg::*;

  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic bit_valid = 0, bit_in = 0, bit_last = 0, is_long = 0;
  logic [7:0] start_value = 0;
  logic tbl_we = 0, tbl_valid = 0;
  logic [2:0] tbl_addr = 0;
  logic [23:0] tbl_data = 0;
  logic msg_valid, msg_long, crc_bad;
  logic [111:0] msg;
  logic [7:0] msg_score;
  logic [23:0] syndrome;

  int checks = 0, failures = 0;

  crc_control #(.TBL_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tbl_write(input int a, input logic [23:0] d, input bit v);
    tbl_we = 1; tbl_addr = 3'(a); tbl_data = d; tbl_valid = v;
    @(negedge clk);
    tbl_we = 0;
  endtask

  // send m, then expect accept (ok) or reject, with the given syndrome
  task automatic run(input string what, input msg_t m, input bit ok, input logic [23:0] syn);
    int n = m[111] ? 112 : 56;
    int sc = $urandom_range(0, 255);
    start_value = 8'(sc);
    for (int i = 0; i < n; i++) begin
      bit_valid = 1; bit_in = m[111 - i]; bit_last = (i == n - 1);
      if (i == 0) is_long = $urandom;     // not yet valid on the first bit
      @(negedge clk);
      if (i == 0) is_long = (n == 112);   // valid from the first bit on
      bit_valid = 0; bit_last = 0;
      if (i < n - 1) repeat ($urandom_range(0, 2)) @(negedge clk);
      if (i == 0) start_value = 8'($urandom);
      if (i == 1) start_value = 8'(sc);
    end
    // the verdict is due 2 clocks after the clock that took the last bit
    checks++;
    if (msg_valid || crc_bad) begin failures++; $display("%s: verdict too early", what); end
    @(negedge clk);
    checks++;
    if (msg_valid !== ok || crc_bad !== !ok || syndrome !== syn) begin
      failures++;
      $display("%s: msg_valid=%0b crc_bad=%0b syndrome=%h, expected ok=%0b syndrome=%h",
               what, msg_valid, crc_bad, syndrome, ok, syn);
    end
    if (ok) begin
      checks++;
      if (msg !== m || msg_long !== (n == 112) || msg_score !== 8'(sc)) begin
        failures++;
        $display("%s: message %h long %0b score %0d", what, msg, msg_long, msg_score);
      end
    end
    @(negedge clk);
  endtask

  msg_t m;
  logic [23:0] addr;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // a published extended squitter with a valid parity field
    run("known DF17", 112'h8D4840D6202CC371C32CE0576098, 1, '0);
    for (int r = 0; r < 20; r++) begin
      run("DF17", make_msg(5'd17, '0), 1, '0);
      run("DF11", make_msg(5'd11, '0), 1, '0);
      m = make_msg(5'd17, '0);
      m[111 - $urandom_range(5, 80)] ^= 1'b1;
      run("DF17 bit error", m, 0, crc_ref(m, 112) ^ m[23:0]);
      m = make_msg(5'd0, '0);
      m[111 - $urandom_range(5, 30)] ^= 1'b1;
      run("DF0 bit error", m, 0, crc_ref(m, 56) ^ m[79:56]);
    end
    for (int r = 0; r < 16; r++) begin
      addr = 24'($urandom) | 24'h1;
      tbl_write(r % DEPTH, addr, 1);
      run("DF4 known address", make_msg(5'd4, addr), 1, addr);
      run("DF20 known address", make_msg(5'd20, addr), 1, addr);
      tbl_write(r % DEPTH, addr, 0);
      run("DF20 removed address", make_msg(5'd20, addr), 0, addr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
