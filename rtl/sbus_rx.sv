// sbus_rx: serial word receiver for the SBUS input line (Sin).
//
// The line idles high. Each 16-bit word is framed as one start bit (low),
// 16 data bits MSB first and one stop bit (high); each bit lasts
// CLKS_PER_BIT clocks of the system clock. The input is synchronised by two
// flip-flops, the falling edge of the start bit is detected, the start bit is
// checked again half a bit later, and every following bit is sampled in its
// middle. A word with a good stop bit is presented on `word` with a one-clock
// `word_valid` pulse; a low stop bit gives a one-clock `frame_err` pulse, the
// word is dropped and no new start bit is looked for until the line has gone
// high again. A start bit that is no longer low at mid-bit is treated
// as a glitch and ignored.
// Timing: `word_valid` is high in the clock that begins
// CLKS_PER_BIT/2 + 17*CLKS_PER_BIT + 2 clocks after the start bit's falling
// edge (the middle of the stop bit, plus the two-stage synchroniser), for
// CLKS_PER_BIT >= 4.
// The published description names the serial line only; framing, bit order and bit timing
// are this design's choices.
module sbus_rx
  import sbus_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 8
) (
  input  logic  clk,
  input  logic  rst,          // synchronous, active high
  input  logic  sin,
  output word_t word,
  output logic  word_valid,
  output logic  frame_err,
  output logic  busy          // a word is being received
);

  localparam int unsigned CW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;
  // Clocks to wait after detecting the start bit so that it, and every later
  // bit, is sampled in its middle: the synchroniser and the detection already
  // take 2 of the CLKS_PER_BIT/2 clocks to the middle.
  localparam int unsigned START_WAIT = (CLKS_PER_BIT / 2 >= 2) ? CLKS_PER_BIT / 2 - 2 : 0;

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_STOP, S_BREAK} state_e;

  state_e          state;
  logic [1:0]      sync;
  logic [CW-1:0]   cnt;
  logic [4:0]      nbit;
  word_t           shreg;

  wire line = sync[1];

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      sync       <= 2'b11;
      state      <= S_IDLE;
      cnt        <= '0;
      nbit       <= '0;
      shreg      <= '0;
      word       <= '0;
      word_valid <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      sync       <= {sync[0], sin};
      word_valid <= 1'b0;
      frame_err  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (!line) begin
            state <= S_START;
            cnt   <= CW'(START_WAIT);
          end
        end
        S_START: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else if (line) state <= S_IDLE;      // glitch, not a start bit
          else begin
            state <= S_DATA;
            cnt   <= CW'(CLKS_PER_BIT - 1);
            nbit  <= '0;
          end
        end
        S_DATA: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            shreg <= {shreg[WORD_W-2:0], line};
            cnt   <= CW'(CLKS_PER_BIT - 1);
            if (nbit == 5'(WORD_W - 1)) state <= S_STOP;
            else                        nbit  <= nbit + 1'b1;
          end
        end
        S_STOP: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            if (line) begin
              state      <= S_IDLE;
              word       <= shreg;
              word_valid <= 1'b1;
            end else begin
              state      <= S_BREAK;
              frame_err  <= 1'b1;
            end
          end
        end
        S_BREAK: if (line) state <= S_IDLE;   // wait for the line to go idle
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
