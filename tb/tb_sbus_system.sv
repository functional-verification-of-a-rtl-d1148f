// tb_sbus_system: end-to-end test of a full 16-slot bus segment at the
// default parameters (8 clocks per bit, module ID 16'h44F1 in every slot).
//
// A bus model plays the processor module and sends messages to random slots
// with random commands; some carry a wrong bus select, a wrong ID, a bad CRC
// or an unknown command. For every message the test checks that only the
// addressed slot reacts: its command indicator pulses once, its out/set
// outputs take the message's data, and for set, out and check_id its
// response comes back on the shared return line with the right words and
// CRC, while no other slot's indicators, outputs or En_tx move. Directed
// cases exercise the gap timeout and a framing error in mid-message. Each of
// these mechanisms is counted and must have happened at least once.
module tb_sbus_system;
  import sbus_pkg::*;

  localparam int unsigned NS  = 16;
  localparam int unsigned CPB = 8;
  localparam word_t       ID  = 16'h44F1;
  localparam logic [1:0]  BUS = 2'd2;
  localparam int unsigned N_MSG = 160;

  logic clk = 1'b0, rst = 1'b1, sin, sout;
  word_t stat     [NS][N_STAT];
  word_t out_ireg [NS][N_OUT];
  word_t set_ireg [NS][N_SET];
  ind_t  ind      [NS];
  logic [NS-1:0] en_tx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sbus_fpm_model #(.CLKS_PER_BIT(CPB)) fpm (.clk, .to_io(sin), .from_io(sout));

  sbus_system dut (
    .Sys_Clk(clk), .Reset(rst), .Sel_Bus(BUS), .Sin(sin), .Sout(sout),
    .Stat_Ireg(stat), .Out_Ireg(out_ireg), .Set_Ireg(set_ireg), .Ind(ind),
    .En_tx(en_tx)
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Indicator pulses and transmitting slots, counted per slot.
  int ind_n [NS][7];
  int tx_n  [NS];
  logic [NS-1:0] en_d = '0;
  always @(posedge clk) begin
    if (!rst) begin
      for (int k = 0; k < NS; k++) begin
        logic [6:0] v;
        v = ind[k];
        for (int b = 0; b < 7; b++) if (v[6-b]) ind_n[k][b]++;
        if (en_tx[k] && !en_d[k]) tx_n[k]++;
      end
      en_d <= en_tx;
    end
  end

  function automatic int cmd_index(input logic [7:0] c);
    case (c)
      CMD_SET: return 0;   CMD_OUT: return 1;    CMD_CHECK_ID: return 2;
      CMD_RESET: return 3; CMD_CLEAR: return 4;  CMD_ENABLE: return 5;
      CMD_DISABLE: return 6;
      default: return -1;
    endcase
  endfunction

  word_t out_m [NS][N_OUT];
  word_t set_m [NS][N_SET];
  int n_cmd [7];
  int n_resp = 0, n_crc = 0, n_bus = 0, n_id = 0, n_unk = 0, n_gap = 0, n_ferr = 0,
      n_ignored = 0;

  task automatic run_msg(input logic [7:0] c, input logic [1:0] bus,
                         input int slot, input word_t id, input bit bad_crc);
    word_t q[$], sq[$];
    word_t w;
    bit got, exp_exec, exp_resp;
    int ind_b [NS][7];
    int tx_b [NS];

    for (int k = 0; k < NS; k++) foreach (stat[k][i]) stat[k][i] = word_t'($urandom);
    q.push_back(make_function(c, bus, 4'(slot)));
    q.push_back(id);
    for (int i = 0; i < ((c == CMD_SET) ? 8 : (c == CMD_OUT) ? 2 : 0); i++)
      q.push_back(word_t'($urandom));
    w = fpm.crc_of(q);
    q.push_back(bad_crc ? ~w : w);
    exp_exec = !bad_crc && bus == BUS && id == ID && cmd_index(c) >= 0;
    exp_resp = exp_exec && cmd_index(c) <= 2;
    if (exp_exec && c == CMD_OUT) for (int i = 0; i < N_OUT; i++) out_m[slot][i] = q[2+i];
    if (exp_exec && c == CMD_SET) for (int i = 0; i < N_SET; i++) set_m[slot][i] = q[2+i];
    ind_b = ind_n;
    tx_b  = tx_n;

    fpm.send_msg(q);
    if (exp_resp) begin
      word_t r [N_RESP];
      for (int i = 0; i < N_RESP; i++) begin
        fpm.recv_word(r[i], got, 40 * CPB);
        check(got, $sformatf("slot %0d response word %0d", slot, i));
      end
      check(r[0] == q[0] && r[1] == q[1], $sformatf("slot %0d response header", slot));
      for (int i = 0; i < N_STAT; i++) begin
        check(r[2+i] == stat[slot][i], $sformatf("slot %0d status word %0d", slot, i));
        sq.push_back(stat[slot][i]);
      end
      check(r[N_RESP-1] == fpm.crc_of(sq), $sformatf("slot %0d response CRC", slot));
      n_resp++;
    end
    repeat (6 * CPB) @(posedge clk);
    check(en_tx == '0, "bus released");

    for (int k = 0; k < NS; k++) begin
      for (int b = 0; b < 7; b++) begin
        int e;
        e = ind_b[k][b] + ((exp_exec && k == slot && b == cmd_index(c)) ? 1 : 0);
        check(ind_n[k][b] == e, $sformatf("slot %0d indicator %0d: %0d exp %0d",
                                          k, b, ind_n[k][b], e));
      end
      check(tx_n[k] == tx_b[k] + ((exp_resp && k == slot) ? 1 : 0),
            $sformatf("slot %0d response count", k));
      for (int i = 0; i < N_OUT; i++) check(out_ireg[k][i] == out_m[k][i],
                                            $sformatf("slot %0d Out_Ireg%0d", k, i));
      for (int i = 0; i < N_SET; i++) check(set_ireg[k][i] == set_m[k][i],
                                            $sformatf("slot %0d Set_Ireg%0d", k, i));
    end
    if (exp_exec) n_cmd[cmd_index(c)]++;
    if (bad_crc) n_crc++;
    else if (bus != BUS) n_bus++;
    else if (id != ID) n_id++;
    else if (cmd_index(c) < 0) n_unk++;
    if (exp_exec) n_ignored += NS - 1;   // the other slots saw it and stayed quiet
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    check(0, "watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] CMDS [7] = '{CMD_SET, CMD_OUT, CMD_CHECK_ID, CMD_RESET,
                                      CMD_CLEAR, CMD_ENABLE, CMD_DISABLE};
  initial begin
    for (int k = 0; k < NS; k++) begin
      foreach (out_m[k][i]) out_m[k][i] = '0;
      foreach (set_m[k][i]) set_m[k][i] = '0;
      foreach (stat[k][i]) stat[k][i] = '0;
      foreach (ind_n[k][b]) ind_n[k][b] = 0;
      tx_n[k] = 0;
    end
    foreach (n_cmd[i]) n_cmd[i] = 0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (4) @(posedge clk);

    // Every command to slot 0 and to slot 15.
    foreach (CMDS[i]) run_msg(CMDS[i], BUS, 0, ID, 1'b0);
    foreach (CMDS[i]) run_msg(CMDS[i], BUS, 15, ID, 1'b0);
    // Rejections.
    run_msg(CMD_SET, BUS, 3, ID, 1'b1);
    run_msg(CMD_SET, BUS + 2'd1, 3, ID, 1'b0);
    run_msg(CMD_CHECK_ID, BUS, 3, 16'h1234, 1'b0);
    run_msg(8'hC3, BUS, 3, ID, 1'b0);
    // Gap timeout, then a full message.
    fpm.send_word(make_function(CMD_SET, BUS, 4'd7));
    fpm.send_word(ID);
    repeat (42 * CPB) @(posedge clk);
    check(dut.g_slot[7].u_ctrl.widx == 0, "gap timeout in slot 7");
    n_gap++;
    run_msg(CMD_CHECK_ID, BUS, 7, ID, 1'b0);
    // Framing error, then a full message.
    fpm.send_word(make_function(CMD_OUT, BUS, 4'd9));
    fpm.send_word(ID, 1'b1);
    repeat (2 * CPB) @(posedge clk);
    check(dut.g_slot[9].u_ctrl.widx == 0, "framing error in slot 9");
    n_ferr++;
    run_msg(CMD_OUT, BUS, 9, ID, 1'b0);
    // Random traffic.
    for (int t = 0; t < N_MSG; t++) begin
      logic [7:0] c;
      logic [1:0] bus;
      word_t id;
      int r;
      r   = $urandom % 100;
      c   = (r < 5) ? 8'hEE : CMDS[$urandom % 7];
      bus = (r >= 5 && r < 10) ? ~BUS : BUS;
      id  = (r >= 10 && r < 15) ? ~ID : ID;
      run_msg(c, bus, $urandom % NS, id, r >= 15 && r < 20);
    end

    foreach (n_cmd[i]) check(n_cmd[i] > 0, $sformatf("command %0d executed", i));
    check(n_resp > 0, "responses");
    check(n_crc > 0, "CRC rejections");
    check(n_bus > 0, "bus-select mismatches");
    check(n_id > 0, "ID mismatches");
    check(n_unk > 0, "unknown commands");
    check(n_gap > 0 && n_ferr > 0, "gap timeout and framing error");
    check(n_ignored > 0, "other slots ignoring a message");
    $display("set=%0d out=%0d chk=%0d rst=%0d clr=%0d ena=%0d dis=%0d resp=%0d",
             n_cmd[0], n_cmd[1], n_cmd[2], n_cmd[3], n_cmd[4], n_cmd[5], n_cmd[6], n_resp);
    $display("crc_bad=%0d bus_miss=%0d id_miss=%0d unknown=%0d gap=%0d ferr=%0d",
             n_crc, n_bus, n_id, n_unk, n_gap, n_ferr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
