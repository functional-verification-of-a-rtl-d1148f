// tb_sbus_tx: starts words on the transmitter and decodes its output line
// with the bus model's receiver; checks every word, the idle-high line, the
// `done` pulse and that each word takes exactly 18*CPB clocks.
module tb_sbus_tx;
  import sbus_pkg::*;
  localparam int unsigned CPB = 8;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0, sout, busy, done, unused_to_io;
  word_t data = '0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  sbus_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .start, .data, .sout, .busy, .done);
  sbus_fpm_model #(.CLKS_PER_BIT(CPB)) fpm (.clk, .to_io(unused_to_io), .from_io(sout));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t sent_q[$];

  // Transmit side: start words, measure the time to `done`.
  initial begin
    longint t0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (sout !== 1'b1) begin failures++; $display("FAIL line not idle high"); end
    for (int t = 0; t < 40; t++) begin
      word_t w;
      w = (t == 0) ? 16'h0000 : (t == 1) ? 16'hFFFF : word_t'($urandom);
      sent_q.push_back(w);
      data  <= w;
      start <= 1'b1;
      @(posedge clk);
      t0 = cyc;
      start <= 1'b0;
      data  <= ~w;                 // must have been latched
      @(posedge clk iff done);
      // `done` is set at the clock that ends the stop bit and is seen here one
      // clock later, so 18*CPB clocks on the line read as 18*CPB + 1.
      checks++;
      if (cyc - t0 != 18 * CPB + 1) begin
        failures++;
        $display("FAIL word time %0d", cyc - t0);
      end
      repeat ($urandom % 4) @(posedge clk);
    end
  end

  // Receive side.
  initial begin
    word_t w;
    bit got;
    @(negedge rst);
    for (int t = 0; t < 40; t++) begin
      fpm.recv_word(w, got, 1000);
      checks++;
      if (!got || sent_q.size() == 0 || w !== sent_q[0]) begin
        failures++;
        $display("FAIL word %0d got=%0d %h", t, got, w);
      end
      if (sent_q.size() != 0) void'(sent_q.pop_front());
    end
    repeat (20) @(posedge clk);
    checks++;
    if (busy || sout !== 1'b1) begin failures++; $display("FAIL not idle at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
