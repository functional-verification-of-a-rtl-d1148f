// sbus_crc16: word-serial CRC-16 accumulator.
//
// The controller runs one of these over the words of each received message
// (to check its CRC word) and one over the DATA words of each response (to
// produce the CRC word it appends). `init` loads the initial value 16'hFFFF;
// `en` folds `data` into the running value (polynomial 0x1021, MSB first).
// When both are high in the same cycle the result is the CRC of `data` alone,
// so the first word of a message can start a new computation.
// Timing: `crc` shows the new value one clock after `en`.
// The published description only says that a CRC code is generated; the polynomial,
// initial value and word-wise update are this design's choices.
module sbus_crc16
  import sbus_pkg::*;
(
  input  logic  clk,
  input  logic  rst,       // synchronous, active high
  input  logic  init,
  input  logic  en,
  input  word_t data,
  output word_t crc
);

  word_t crc_next;

  always_comb begin
    word_t base;
    base = init ? CRC_INIT : crc;
    if (en)        crc_next = crc16_word(base, data);
    else           crc_next = base;
  end

  always_ff @(posedge clk) begin
    if (rst) crc <= CRC_INIT;
    else     crc <= crc_next;
  end

endmodule
