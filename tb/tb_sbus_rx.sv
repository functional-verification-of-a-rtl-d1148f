// tb_sbus_rx: drives framed serial words into the receiver through the bus
// model and checks the received words, the frame-error pulse on a low stop
// bit, that a short low glitch is ignored, and the latency from the start
// bit's falling edge to `word_valid` (CPB/2 + 17*CPB + 2 clocks).
module tb_sbus_rx;
  import sbus_pkg::*;
  localparam int unsigned CPB = 8;

  logic clk = 1'b0, rst = 1'b1, line, unused_back = 1'b1;
  word_t word;
  logic word_valid, frame_err, busy;
  int checks = 0, failures = 0;
  longint cyc = 0, t_start = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  sbus_fpm_model #(.CLKS_PER_BIT(CPB)) fpm (.clk, .to_io(line), .from_io(unused_back));
  sbus_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .sin(line), .word, .word_valid,
                                     .frame_err, .busy);

  word_t exp_q[$];
  int n_ferr = 0;

  // Check words as they arrive; t_start is set when a word's start bit begins.
  always @(posedge clk) begin
    if (!rst && word_valid) begin
      checks++;
      if (exp_q.size() == 0 || word !== exp_q[0]) begin
        failures++;
        $display("FAIL unexpected word %h", word);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      // word_valid is set CPB/2 + 17*CPB + 2 clocks after the falling edge
      // and seen by this block one clock later.
      checks++;
      if (cyc - t_start != CPB/2 + 17*CPB + 3) begin
        failures++;
        $display("FAIL latency %0d", cyc - t_start);
      end
    end
    if (!rst && frame_err) n_ferr++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t w;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(posedge clk);
    // Edge patterns then random words, with and without idle gaps.
    for (int t = 0; t < 60; t++) begin
      case (t)
        0: w = 16'h0000;
        1: w = 16'hFFFF;
        2: w = 16'hA55A;
        3: w = 16'h8001;
        default: w = word_t'($urandom);
      endcase
      exp_q.push_back(w);
      t_start = cyc;
      fpm.send_word(w);
      if (t % 3 == 0) repeat ($urandom % 20) @(posedge clk);
    end
    repeat (CPB) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words lost", exp_q.size()); end
    // Low stop bit: no word, one frame error.
    fpm.send_word(16'h1234, 1'b1);
    repeat (3 * CPB) @(posedge clk);
    checks++;
    if (n_ferr != 1) begin failures++; $display("FAIL frame errors %0d", n_ferr); end
    // A glitch shorter than half a bit is not a start bit.
    fpm.to_io = 1'b0;
    repeat (2) @(posedge clk);
    fpm.to_io = 1'b1;
    repeat (20 * CPB) @(posedge clk);
    checks++;
    if (busy || n_ferr != 1) begin failures++; $display("FAIL glitch accepted"); end
    // And the receiver still works afterwards.
    exp_q.push_back(16'h5AA5);
    t_start = cyc;
    fpm.send_word(16'h5AA5);
    repeat (2 * CPB) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL word after glitch lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
