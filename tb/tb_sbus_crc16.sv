// tb_sbus_crc16: checks the word-serial CRC-16 unit against an independent
// bit-serial reference, including the init-and-update case used on the first
// word of a message, a hold cycle with `en` low, and reset.
module tb_sbus_crc16;
  import sbus_pkg::*;

  logic clk = 1'b0, rst = 1'b1, init = 1'b0, en = 1'b0;
  word_t data = '0, crc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sbus_crc16 dut (.clk, .rst, .init, .en, .data, .crc);

  function automatic word_t ref_crc(input word_t words[$]);
    word_t r = 16'hFFFF;
    foreach (words[i]) begin
      r ^= words[i];
      repeat (16) r = r[15] ? ((r << 1) ^ 16'h1021) : (r << 1);
    end
    return r;
  endfunction

  task automatic check(input word_t exp, input string what);
    checks++;
    if (crc !== exp) begin
      failures++;
      $display("FAIL %s: crc=%h expected %h", what, crc, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t q[$];
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(16'hFFFF, "after reset");
    // Known value: CRC-16/CCITT-FALSE of the ASCII bytes "12345678".
    q = '{16'h3132, 16'h3334, 16'h3536, 16'h3738};
    foreach (q[i]) begin
      init <= (i == 0); en <= 1'b1; data <= q[i];
      @(posedge clk);
    end
    init <= 1'b0; en <= 1'b0;
    @(posedge clk);
    check(ref_crc(q), "12345678 vs reference");
    @(posedge clk);
    check(ref_crc(q), "hold with en low");
    for (int t = 0; t < 100; t++) begin
      int n;
      n = 1 + ($urandom % 11);
      q = {};
      for (int i = 0; i < n; i++) q.push_back(word_t'($urandom));
      foreach (q[i]) begin
        init <= (i == 0); en <= 1'b1; data <= q[i];
        @(posedge clk);
      end
      en <= 1'b0; init <= 1'b0;
      @(posedge clk);
      check(ref_crc(q), $sformatf("random message %0d", t));
    end
    init <= 1'b1;
    @(posedge clk);
    init <= 1'b0;
    @(posedge clk);
    check(16'hFFFF, "init alone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
