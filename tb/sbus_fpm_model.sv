// sbus_fpm_model: behavioural model of the processor module's side of the
// serial bus, for testbenches only.
//
// It drives the line towards the I/O modules (`to_io`, idle high) and listens
// to the line coming back (`from_io`). Words are framed as the I/O modules
// expect: start bit low, 16 data bits MSB first, stop bit high, each bit
// CLKS_PER_BIT clocks. Tasks:
//   send_word(w, bad_stop)   one word, optionally with a low stop bit
//   send_msg(words)          the words back to back, one idle bit between
//   recv_word(w, got, limit) wait up to `limit` clocks for a start bit, then
//                            sample a word in the middle of each bit
//   crc_of(words)            reference CRC-16 (poly 0x1021, init 16'hFFFF),
//                            written independently of the RTL: each word is
//                            XORed into the register which is then shifted
//                            16 times.
module sbus_fpm_model #(
  parameter int unsigned CLKS_PER_BIT = 8
) (
  input  logic clk,
  output logic to_io,
  input  logic from_io
);

  initial to_io = 1'b1;

  task automatic bit_out(input logic b);
    to_io = b;
    repeat (CLKS_PER_BIT) @(posedge clk);
  endtask

  task automatic send_word(input logic [15:0] w, input bit bad_stop = 1'b0);
    bit_out(1'b0);
    for (int i = 15; i >= 0; i--) bit_out(w[i]);
    bit_out(!bad_stop);
    to_io = 1'b1;
  endtask

  task automatic send_msg(input logic [15:0] words[$]);
    foreach (words[i]) begin
      send_word(words[i]);
      bit_out(1'b1);
    end
  endtask

  task automatic recv_word(output logic [15:0] w, output bit got,
                           input int unsigned limit);
    int unsigned n;
    got = 1'b0;
    w   = '0;
    n   = 0;
    while (from_io !== 1'b0 && n < limit) begin
      @(posedge clk);
      n++;
    end
    if (from_io === 1'b0) begin
      repeat (CLKS_PER_BIT / 2) @(posedge clk);     // middle of the start bit
      for (int i = 15; i >= 0; i--) begin
        repeat (CLKS_PER_BIT) @(posedge clk);
        w[i] = from_io;
      end
      repeat (CLKS_PER_BIT) @(posedge clk);          // middle of the stop bit
      got = (from_io === 1'b1);
      repeat (CLKS_PER_BIT / 2) @(posedge clk);
    end
  endtask

  function automatic logic [15:0] crc_of(input logic [15:0] words[$]);
    logic [15:0] r;
    r = 16'hFFFF;
    foreach (words[i]) begin
      r ^= words[i];
      repeat (16) r = r[15] ? ((r << 1) ^ 16'h1021) : (r << 1);
    end
    return r;
  endfunction

endmodule
