// tb_sbus_ctrl: self-checking random test of the SBUS slave controller.
//
// A bus model plays the processor module. Each message gets a random command
// (the seven known ones plus an unknown code), a bus select and slot that
// usually match the controller's, an ID that usually matches, random DATA and
// now and then a corrupted CRC; the six status inputs are random for each
// message. A scoreboard keeps a mirror of REC_reg00..09 and CRC_reg and reads
// the controller's registers directly (a backdoor peek) after every message.
// It also checks the command indicators (which one, how often, and two clocks
// after the last word is received), Out_Ireg/Set_Ireg, every response word
// including its CRC, the delay from indicator to En_tx and how long En_tx
// stays high. Directed cases add: a message abandoned halfway (gap timeout),
// a bad stop bit inside a message, and a message for another slot.
//
// A register-coverage collector samples the peeked registers after each
// message: the command, bus-select and slot fields of REC_reg00 (one bin per
// value), REC_reg01 (module ID or other), the registers a message wrote among
// REC_reg02..09 and CRC_reg (64 equal value ranges each), and every word that
// passed through Tx_reg (64 ranges). It prints a per-register report and
// requires full coverage of REC_reg00 and REC_reg01, the fields that select
// and identify the module.
module tb_sbus_ctrl;
  import sbus_pkg::*;

  localparam int unsigned CPB       = 8;
  localparam word_t       ID        = 16'h44F1;
  localparam logic [1:0]  MY_BUS    = 2'd3;
  localparam logic [3:0]  MY_SLOT   = 4'd5;
  localparam int unsigned GAP_BITS  = 40;
  localparam int unsigned TURN_BITS = 2;
  localparam int unsigned N_MSG     = 400;

  logic clk = 1'b0, rst = 1'b1;
  logic sin, sout, en_tx;
  logic i_set, i_out, i_chk, i_rst, i_clr, i_ena, i_dis;
  word_t stat [N_STAT];
  word_t out_ireg [N_OUT];
  word_t set_ireg [N_SET];
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  sbus_fpm_model #(.CLKS_PER_BIT(CPB)) fpm (.clk, .to_io(sin), .from_io(sout));

  sbus_ctrl #(.CLKS_PER_BIT(CPB), .MODULE_ID(ID), .GAP_BITS(GAP_BITS),
              .TURNAROUND_BITS(TURN_BITS)) dut (
    .Reset(rst), .Sys_Clk(clk), .Sel_Bus(MY_BUS), .Pos_Slot(MY_SLOT), .Sin(sin),
    .Stat_Ireg(stat), .En_tx(en_tx), .Sout(sout),
    .Ind_reg_set(i_set), .Ind_reg_out(i_out), .Ind_reg_chk(i_chk),
    .Ind_cmd_rst(i_rst), .Ind_cmd_clr(i_clr), .Ind_cmd_ena(i_ena),
    .Ind_cmd_dis(i_dis), .Out_Ireg(out_ireg), .Set_Ireg(set_ireg)
  );

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d: %s", cyc, msg);
  endtask

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) fail(msg);
  endtask

  // ------------------------------------------------------------ monitors
  logic [6:0] ind_vec;
  assign ind_vec = {i_set, i_out, i_chk, i_rst, i_clr, i_ena, i_dis};
  int     ind_count [7];
  longint ind_cyc, last_wv_cyc, entx_rise_cyc, entx_fall_cyc;
  logic   en_tx_d = 1'b0;

  always @(posedge clk) begin
    if (!rst) begin
      if (dut.u_rx.word_valid) last_wv_cyc = cyc;
      if (ind_vec != 0) begin
        ind_cyc = cyc;
        for (int i = 0; i < 7; i++) if (ind_vec[6-i]) ind_count[i]++;
      end
      if (en_tx && !en_tx_d) entx_rise_cyc = cyc;
      if (!en_tx && en_tx_d) entx_fall_cyc = cyc;
      en_tx_d <= en_tx;
      if (!en_tx && sout !== 1'b1) fail("Sout low while En_tx is low");
    end
  end

  // ------------------------------------------------------------ mirror
  word_t rec_m [N_REC];
  word_t crc_m;
  word_t out_m [N_OUT];
  word_t set_m [N_SET];

  function automatic int cmd_index(input logic [7:0] c);
    case (c)
      CMD_SET:      return 0;
      CMD_OUT:      return 1;
      CMD_CHECK_ID: return 2;
      CMD_RESET:    return 3;
      CMD_CLEAR:    return 4;
      CMD_ENABLE:   return 5;
      CMD_DISABLE:  return 6;
      default:      return -1;
    endcase
  endfunction

  function automatic int n_data(input logic [7:0] c);
    return (c == CMD_SET) ? 8 : (c == CMD_OUT) ? 2 : 0;
  endfunction

  // ------------------------------------------------------------ coverage
  bit cov_cmd [7];
  bit cov_sel [4];
  bit cov_pos [16];
  bit cov_id  [2];
  bit cov_rx  [11][64];   // index 2..9: REC_reg02..09, 10: CRC_reg
  bit cov_tx  [64];

  function automatic real pct(input int hit, input int n);
    return 100.0 * hit / n;
  endfunction

  task automatic cov_sample(input int n_words);
    int ci;
    ci = cmd_index(fn_command(dut.rec_reg[0]));
    if (ci >= 0) cov_cmd[ci] = 1'b1;
    cov_sel[fn_sel_bus(dut.rec_reg[0])] = 1'b1;
    cov_pos[fn_pos_slot(dut.rec_reg[0])] = 1'b1;
    cov_id[(dut.rec_reg[1] == ID) ? 0 : 1] = 1'b1;
    for (int i = 2; i < N_REC && i < n_words; i++) cov_rx[i][dut.rec_reg[i][15:10]] = 1'b1;
    cov_rx[10][dut.crc_reg[15:10]] = 1'b1;
  endtask

  task automatic cov_report();
    int h;
    int total_hit = 0, total_n = 0;
    h = 0; foreach (cov_cmd[i]) h += cov_cmd[i];
    $display("RX0_CMD      %5.1f%%", pct(h, 7));  total_hit += h; total_n += 7;
    check(h == 7, "RX0 command coverage 100%");
    h = 0; foreach (cov_sel[i]) h += cov_sel[i];
    $display("RX0_sel_bus  %5.1f%%", pct(h, 4));  total_hit += h; total_n += 4;
    check(h == 4, "RX0 sel_bus coverage 100%");
    h = 0; foreach (cov_pos[i]) h += cov_pos[i];
    $display("RX0_pos_slot %5.1f%%", pct(h, 16)); total_hit += h; total_n += 16;
    check(h == 16, "RX0 pos_slot coverage 100%");
    h = cov_id[0] + cov_id[1];
    $display("RX1          %5.1f%%", pct(h, 2));  total_hit += h; total_n += 2;
    check(h == 2, "RX1 coverage 100%");
    for (int r = 2; r <= 10; r++) begin
      h = 0; foreach (cov_rx[r][i]) h += cov_rx[r][i];
      $display("%-12s %5.1f%%", $sformatf("RX%0d", r), pct(h, 64));
      total_hit += h; total_n += 64;
    end
    h = 0; foreach (cov_tx[i]) h += cov_tx[i];
    $display("TX0          %5.1f%%", pct(h, 64)); total_hit += h; total_n += 64;
    $display("register coverage %5.1f%% (%0d of %0d bins)", pct(total_hit, total_n),
             total_hit, total_n);
  endtask

  always @(posedge clk) if (!rst && dut.tstate == dut.T_SEND) cov_tx[dut.tx_reg[15:10]] = 1'b1;

  int n_wrong_id_sent = 0;
  int n_exec = 0, n_resp = 0, n_crc_bad = 0, n_addr_miss = 0, n_id_miss = 0,
      n_unknown = 0, n_gap = 0, n_ferr = 0;
  int n_by_cmd [7];

  // Sends one message and checks everything that follows from it.
  task automatic run_msg(input logic [7:0] c, input logic [1:0] bus,
                         input logic [3:0] slot, input word_t id,
                         input bit bad_crc);
    word_t q[$];
    word_t crc;
    int    cnt_before [7];
    bit    exp_exec, exp_resp;
    longint t_last;
    word_t resp [N_RESP];
    word_t resp_crc_q[$];

    foreach (stat[i]) stat[i] = word_t'($urandom);
    q.push_back(make_function(c, bus, slot));
    q.push_back(id);
    for (int i = 0; i < n_data(c); i++) q.push_back(word_t'($urandom));
    crc = fpm.crc_of(q);
    q.push_back(bad_crc ? (crc ^ (16'h1 << ($urandom % 16))) : crc);

    // Expected register contents: words fill REC_reg00.. in order, the last
    // also goes to CRC_reg.
    foreach (q[i]) if (i < N_REC) rec_m[i] = q[i];
    crc_m = q[q.size() - 1];

    exp_exec = !bad_crc && bus == MY_BUS && slot == MY_SLOT && id == ID
               && cmd_index(c) >= 0;
    exp_resp = exp_exec && (c == CMD_SET || c == CMD_OUT || c == CMD_CHECK_ID);
    if (exp_exec && c == CMD_OUT) for (int i = 0; i < N_OUT; i++) out_m[i] = q[2+i];
    if (exp_exec && c == CMD_SET) for (int i = 0; i < N_SET; i++) set_m[i] = q[2+i];

    foreach (cnt_before[i]) cnt_before[i] = ind_count[i];
    ind_cyc = 0;
    fpm.send_msg(q);
    t_last = last_wv_cyc;

    if (exp_resp) begin
      bit got;
      for (int i = 0; i < N_RESP; i++) begin
        fpm.recv_word(resp[i], got, 40 * CPB);
        check(got, $sformatf("response word %0d received", i));
      end
      check(resp[0] == q[0], $sformatf("response FUNCTION %h exp %h", resp[0], q[0]));
      check(resp[1] == q[1], $sformatf("response ID %h exp %h", resp[1], q[1]));
      for (int i = 0; i < N_STAT; i++) begin
        check(resp[2+i] == stat[i], $sformatf("response status %0d %h exp %h",
                                                i, resp[2+i], stat[i]));
        resp_crc_q.push_back(stat[i]);
      end
      check(resp[N_RESP-1] == fpm.crc_of(resp_crc_q),
            $sformatf("response CRC %h exp %h", resp[N_RESP-1], fpm.crc_of(resp_crc_q)));
      repeat (4) @(posedge clk);
      check(entx_rise_cyc - ind_cyc == TURN_BITS * CPB + 1,
            $sformatf("indicator to En_tx %0d", entx_rise_cyc - ind_cyc));
      check(entx_fall_cyc - entx_rise_cyc == N_RESP * (18 * CPB + 3),
            $sformatf("En_tx high for %0d clocks", entx_fall_cyc - entx_rise_cyc));
      n_resp++;
    end else begin
      repeat ((TURN_BITS + 4) * CPB) @(posedge clk);
      check(!en_tx && entx_rise_cyc < t_last, "no response expected");
    end

    // Backdoor peek of the register set against the mirror.
    for (int i = 0; i < N_REC; i++)
      check(dut.rec_reg[i] == rec_m[i],
            $sformatf("REC_reg%02d %h exp %h", i, dut.rec_reg[i], rec_m[i]));
    check(dut.crc_reg == crc_m, $sformatf("CRC_reg %h exp %h", dut.crc_reg, crc_m));
    if (exp_resp)
      check(dut.tx_reg == resp[N_RESP-1], "Tx_reg holds the last response word");

    // Indicators: exactly the expected one, once, two clocks after the CRC
    // word was received.
    for (int i = 0; i < 7; i++) begin
      int exp_n = cnt_before[i] + ((exp_exec && cmd_index(c) == i) ? 1 : 0);
      check(ind_count[i] == exp_n, $sformatf("indicator %0d count %0d exp %0d (cmd %h)",
                                             i, ind_count[i], exp_n, c));
    end
    if (exp_exec) check(ind_cyc - t_last == 2, $sformatf("indicator latency %0d", ind_cyc - t_last));

    for (int i = 0; i < N_OUT; i++)
      check(out_ireg[i] == out_m[i], $sformatf("Out_Ireg%02d %h exp %h", i, out_ireg[i], out_m[i]));
    for (int i = 0; i < N_SET; i++)
      check(set_ireg[i] == set_m[i], $sformatf("Set_Ireg%02d %h exp %h", i, set_ireg[i], set_m[i]));

    cov_sample(q.size());
    if (exp_exec) begin n_exec++; n_by_cmd[cmd_index(c)]++; end
    if (bad_crc) n_crc_bad++;
    else if (bus != MY_BUS || slot != MY_SLOT) n_addr_miss++;
    else if (id != ID) n_id_miss++;
    else if (cmd_index(c) < 0) n_unknown++;
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus
  localparam logic [7:0] CMDS [7] = '{CMD_SET, CMD_OUT, CMD_CHECK_ID, CMD_RESET,
                                      CMD_CLEAR, CMD_ENABLE, CMD_DISABLE};
  initial begin
    foreach (stat[i]) stat[i] = '0;
    foreach (rec_m[i]) rec_m[i] = '0;
    foreach (out_m[i]) out_m[i] = '0;
    foreach (set_m[i]) set_m[i] = '0;
    foreach (ind_count[i]) ind_count[i] = 0;
    foreach (n_by_cmd[i]) n_by_cmd[i] = 0;
    foreach (cov_cmd[i]) cov_cmd[i] = 1'b0;
    foreach (cov_sel[i]) cov_sel[i] = 1'b0;
    foreach (cov_pos[i]) cov_pos[i] = 1'b0;
    foreach (cov_id[i]) cov_id[i] = 1'b0;
    foreach (cov_rx[r, i]) cov_rx[r][i] = 1'b0;
    foreach (cov_tx[i]) cov_tx[i] = 1'b0;
    crc_m = '0;
    entx_rise_cyc = 0; entx_fall_cyc = 0; last_wv_cyc = 0; ind_cyc = 0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (4) @(posedge clk);

    // Reset values: every register reads 16'h0000.
    for (int i = 0; i < N_REC; i++) check(dut.rec_reg[i] == 16'h0, "REC reset value");
    check(dut.crc_reg == 16'h0 && dut.tx_reg == 16'h0, "CRC_reg/Tx_reg reset value");

    // Each command once, addressed correctly.
    foreach (CMDS[i]) run_msg(CMDS[i], MY_BUS, MY_SLOT, ID, 1'b0);

    // A message for another slot, another bus, a wrong ID, a bad CRC and an
    // unknown command: stored, not executed.
    run_msg(CMD_SET, MY_BUS, MY_SLOT + 4'd1, ID, 1'b0);
    run_msg(CMD_OUT, MY_BUS - 2'd1, MY_SLOT, ID, 1'b0);
    run_msg(CMD_CHECK_ID, MY_BUS, MY_SLOT, ID ^ 16'h0100, 1'b0);
    run_msg(CMD_OUT, MY_BUS, MY_SLOT, ID, 1'b1);
    run_msg(8'h80, MY_BUS, MY_SLOT, ID, 1'b0);

    // Gap timeout: FUNCTION and ID of a set message, then silence longer than
    // GAP_BITS bit times; the next message must be parsed from its start.
    fpm.send_word(make_function(CMD_SET, MY_BUS, MY_SLOT));
    fpm.send_word(ID);
    repeat ((GAP_BITS + 2) * CPB) @(posedge clk);
    check(dut.widx == 0, "message abandoned after the gap timeout");
    n_gap++;
    run_msg(CMD_CHECK_ID, MY_BUS, MY_SLOT, ID, 1'b0);

    // Bad stop bit inside a message: the message is dropped.
    fpm.send_word(make_function(CMD_OUT, MY_BUS, MY_SLOT));
    fpm.send_word(ID, 1'b1);
    repeat (2 * CPB) @(posedge clk);
    check(dut.widx == 0, "message abandoned after a framing error");
    n_ferr++;
    run_msg(CMD_OUT, MY_BUS, MY_SLOT, ID, 1'b0);

    // Random messages.
    for (int t = 0; t < N_MSG; t++) begin
      logic [7:0] c;
      logic [1:0] bus;
      logic [3:0] slot;
      word_t      id;
      c    = (($urandom >> 8) % 16 == 0) ? 8'($urandom >> 8) : CMDS[($urandom >> 8) % 7];
      bus  = (($urandom >> 8) % 5 == 0) ? 2'($urandom >> 8) : MY_BUS;
      slot = (($urandom >> 8) % 5 == 0) ? 4'($urandom >> 8) : MY_SLOT;
      id   = (($urandom >> 8) % 10 == 0) ? word_t'($urandom >> 8) : ID;
      if (id != ID) n_wrong_id_sent++;
      run_msg(c, bus, slot, id, ($urandom >> 8) % 10 == 0);
    end

    // Every mechanism must have happened.
    foreach (n_by_cmd[i]) check(n_by_cmd[i] > 0, $sformatf("command %0d never executed", i));
    check(n_resp > 0 && n_crc_bad > 0 && n_addr_miss > 0 && n_id_miss > 0 && n_unknown > 0
          && n_gap > 0 && n_ferr > 0, "every rejection case seen");
    cov_report();
    $display("messages sent with a foreign ID: %0d", n_wrong_id_sent);
    $display("executed=%0d responses=%0d bad_crc=%0d addr_miss=%0d id_miss=%0d unknown=%0d",
             n_exec, n_resp, n_crc_bad, n_addr_miss, n_id_miss, n_unknown);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
