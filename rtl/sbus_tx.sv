// sbus_tx: serial word transmitter for the SBUS output line (Sout).
//
// On a `start` pulse while idle the module latches `data` and sends it as one
// start bit (low), 16 data bits MSB first and one stop bit (high), each bit
// CLKS_PER_BIT clocks long, the same framing the receiver expects. `sout`
// idles high. `done` pulses for one clock at the end of the stop bit, when
// the next word may be started; `busy` is high while a word is on the line.
// Timing: a word occupies exactly 18*CLKS_PER_BIT clocks; `sout` changes one
// clock after `start`.
// Framing and timing are this design's choices (the published description names only Sout).
module sbus_tx
  import sbus_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 8
) (
  input  logic  clk,
  input  logic  rst,     // synchronous, active high
  input  logic  start,
  input  word_t data,
  output logic  sout,
  output logic  busy,
  output logic  done
);

  localparam int unsigned CW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;
  localparam int unsigned NBITS = WORD_W + 2;   // start + data + stop

  logic [CW-1:0]  cnt;
  logic [4:0]     nbit;
  logic [NBITS-1:0] frame;   // bits still to send, next one in the MSB

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      sout  <= 1'b1;
      cnt   <= '0;
      nbit  <= '0;
      frame <= '1;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        sout <= 1'b1;
        if (start) begin
          busy  <= 1'b1;
          sout  <= 1'b0;                        // start bit
          frame <= {data, 1'b1, 1'b1};          // data then stop, then filler
          cnt   <= CW'(CLKS_PER_BIT - 1);
          nbit  <= '0;
        end
      end else if (cnt != 0) begin
        cnt <= cnt - 1'b1;
      end else if (nbit == 5'(NBITS - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
        sout <= 1'b1;
      end else begin
        sout  <= frame[NBITS-1];
        frame <= {frame[NBITS-2:0], 1'b1};
        nbit  <= nbit + 1'b1;
        cnt   <= CW'(CLKS_PER_BIT - 1);
      end
    end
  end

endmodule
