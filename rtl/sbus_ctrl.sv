// sbus_ctrl: SBUS slave controller of one I/O module (SBUS_CTRL).
//
// The processor module (FPM) sends messages FUNCTION, ID, DATA[n], CRC on the
// shared serial line Sin (see sbus_pkg for the word layout). The controller
// stores the words of every message in order in its receive registers
// REC_reg00..09; the last word (the CRC field) is also kept in CRC_reg. So
// FUNCTION lands in REC_reg00, ID in REC_reg01, DATA in REC_reg02 onward, and
// the CRC word of a short message lands in the next free REC register as well
// (REC_reg02 for check_id, REC_reg04 for out); the CRC word of a set message,
// the eleventh word, goes to CRC_reg only.
//
// A message is executed when its CRC word equals the CRC of the words before
// it, its bus select and slot position equal the Sel_Bus and Pos_Slot inputs,
// its ID equals MODULE_ID and its command is one of the seven known ones.
// Execution pulses the matching command indicator for one clock, and
//   out : copies REC_reg02..03 to Out_Ireg00..01,
//   set : copies REC_reg02..09 to Set_Ireg00..07,
// and for set, out and check_id starts a response. The response is
// REC_reg00, REC_reg01, Stat_Ireg00..05 and the CRC of those six status
// words, each word passed through Tx_reg in turn and shifted out on Sout
// while En_tx is high. A response is not started while one is still being
// sent. A message whose words stop arriving for GAP_BITS bit times, or with
// a bad stop bit, is abandoned and the next word is taken as a new FUNCTION.
//
// Timing: indicators, Out_Ireg and Set_Ireg change two clocks after the
// receiver delivers the CRC word; En_tx rises TURNAROUND_BITS*CLKS_PER_BIT+1
// clocks after the indicator and stays high for the 9 response words,
// 9*(18*CLKS_PER_BIT+3) clocks in all (each word is 18 bit times on the line
// plus 3 clocks to load Tx_reg and start the next one).
//
// From the published description: the register set, the message fields and their sizes,
// the seven commands, which commands answer, the content of the response
// and the port list. This design's own choices: the serial framing, the
// command codes, the CRC polynomial, the address and ID check, the gap
// timeout, pulse-shaped indicators, synchronous active-high reset and the
// turnaround delay.
module sbus_ctrl
  import sbus_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT    = 8,
  parameter word_t       MODULE_ID       = 16'h44F1,
  parameter int unsigned GAP_BITS        = 40,
  parameter int unsigned TURNAROUND_BITS = 2
) (
  input  logic       Reset,                 // synchronous, active high
  input  logic       Sys_Clk,
  input  logic [1:0] Sel_Bus,
  input  logic [3:0] Pos_Slot,
  input  logic       Sin,
  input  word_t      Stat_Ireg [N_STAT],
  output logic       En_tx,
  output logic       Sout,
  output logic       Ind_reg_set,
  output logic       Ind_reg_out,
  output logic       Ind_reg_chk,
  output logic       Ind_cmd_rst,
  output logic       Ind_cmd_clr,
  output logic       Ind_cmd_ena,
  output logic       Ind_cmd_dis,
  output word_t      Out_Ireg [N_OUT],
  output word_t      Set_Ireg [N_SET]
);

  localparam int unsigned GAP_CYCLES  = GAP_BITS * CLKS_PER_BIT;
  localparam int unsigned TURN_CYCLES = TURNAROUND_BITS * CLKS_PER_BIT;
  localparam int unsigned GW = $clog2(GAP_CYCLES + 1);
  localparam int unsigned TW = $clog2(TURN_CYCLES + 1);

  // ---------------------------------------------------------------- registers
  word_t rec_reg [N_REC];   // REC_reg00..09
  word_t crc_reg;           // CRC_reg
  word_t tx_reg;            // Tx_reg

  // ---------------------------------------------------------------- receiver
  word_t rx_word;
  logic  rx_valid, rx_ferr, rx_busy;

  sbus_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk(Sys_Clk), .rst(Reset), .sin(Sin),
    .word(rx_word), .word_valid(rx_valid), .frame_err(rx_ferr), .busy(rx_busy)
  );

  logic [3:0]    widx;      // index of the next word in the message
  logic [3:0]    nwords;    // words in the current message, known after word 0
  logic [GW-1:0] gap_cnt;
  logic          rx_last;
  word_t         rx_crc;

  // The CRC word is the last one; every word before it enters the CRC.
  assign rx_last = rx_valid && (widx != 0) && (widx == nwords - 4'd1);

  sbus_crc16 u_rx_crc (
    .clk(Sys_Clk), .rst(Reset),
    .init(rx_valid && widx == 0), .en(rx_valid && !rx_last),
    .data(rx_word), .crc(rx_crc)
  );

  logic exec;               // message complete, check it in the next clock

  always_ff @(posedge Sys_Clk) begin
    if (Reset) begin
      for (int i = 0; i < N_REC; i++) rec_reg[i] <= '0;
      crc_reg <= '0;
      widx    <= '0;
      nwords  <= 4'd3;
      gap_cnt <= '0;
      exec    <= 1'b0;
    end else begin
      exec <= 1'b0;
      if (rx_valid) begin
        gap_cnt <= '0;
        if (widx < 4'(N_REC)) rec_reg[widx] <= rx_word;
        if (widx == 0) nwords <= 4'(3 + data_words(fn_command(rx_word)));
        if (rx_last) begin
          crc_reg <= rx_word;
          widx    <= '0;
          exec    <= 1'b1;
        end else begin
          widx <= widx + 4'd1;
        end
      end else if (rx_ferr) begin
        widx    <= '0;
        gap_cnt <= '0;
      end else if (widx != 0 && !rx_busy) begin
        if (gap_cnt == GW'(GAP_CYCLES)) begin
          widx    <= '0;
          gap_cnt <= '0;
        end else begin
          gap_cnt <= gap_cnt + 1'b1;
        end
      end
    end
  end

  // ---------------------------------------------------------------- execute
  logic [7:0] cmd;
  logic       accept;
  assign cmd    = fn_command(rec_reg[0]);
  assign accept = exec && (crc_reg == rx_crc) && is_known_cmd(cmd)
                  && fn_sel_bus(rec_reg[0]) == Sel_Bus
                  && fn_pos_slot(rec_reg[0]) == Pos_Slot
                  && rec_reg[1] == MODULE_ID;

  typedef enum logic [2:0] {T_IDLE, T_TURN, T_LOAD, T_SEND, T_WAIT} tstate_e;
  tstate_e tstate;

  ind_t ind;
  always_ff @(posedge Sys_Clk) begin
    if (Reset) begin
      ind <= '0;
      for (int i = 0; i < N_OUT; i++) Out_Ireg[i] <= '0;
      for (int i = 0; i < N_SET; i++) Set_Ireg[i] <= '0;
    end else begin
      ind <= '0;
      if (accept) begin
        unique case (cmd)
          CMD_SET: begin
            ind.set <= 1'b1;
            for (int i = 0; i < N_SET; i++) Set_Ireg[i] <= rec_reg[2+i];
          end
          CMD_OUT: begin
            ind.out <= 1'b1;
            for (int i = 0; i < N_OUT; i++) Out_Ireg[i] <= rec_reg[2+i];
          end
          CMD_CHECK_ID: ind.chk <= 1'b1;
          CMD_RESET:    ind.rst <= 1'b1;
          CMD_CLEAR:    ind.clr <= 1'b1;
          CMD_ENABLE:   ind.ena <= 1'b1;
          CMD_DISABLE:  ind.dis <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  assign Ind_reg_set = ind.set;
  assign Ind_reg_out = ind.out;
  assign Ind_reg_chk = ind.chk;
  assign Ind_cmd_rst = ind.rst;
  assign Ind_cmd_clr = ind.clr;
  assign Ind_cmd_ena = ind.ena;
  assign Ind_cmd_dis = ind.dis;

  // ---------------------------------------------------------------- response
  logic [3:0]    tidx;
  logic [TW-1:0] turn_cnt;
  logic          tx_start, tx_done, tx_sout;
  logic          txc_init, txc_en;
  word_t         tx_crc, tx_src;

  always_comb begin
    if (tidx == 4'd0)                 tx_src = rec_reg[0];
    else if (tidx == 4'd1)            tx_src = rec_reg[1];
    else if (tidx < 4'(2 + N_STAT))   tx_src = Stat_Ireg[3'(tidx - 4'd2)];
    else                              tx_src = tx_crc;
  end

  assign txc_init = (tstate == T_IDLE);
  assign txc_en   = (tstate == T_LOAD) && tidx >= 4'd2 && tidx < 4'(2 + N_STAT);

  sbus_crc16 u_tx_crc (
    .clk(Sys_Clk), .rst(Reset), .init(txc_init), .en(txc_en),
    .data(tx_src), .crc(tx_crc)
  );

  sbus_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk(Sys_Clk), .rst(Reset), .start(tx_start), .data(tx_reg),
    .sout(tx_sout), .busy(), .done(tx_done)
  );

  assign tx_start = (tstate == T_SEND);
  assign En_tx    = (tstate == T_LOAD) || (tstate == T_SEND) || (tstate == T_WAIT);
  assign Sout     = En_tx ? tx_sout : 1'b1;

  always_ff @(posedge Sys_Clk) begin
    if (Reset) begin
      tstate   <= T_IDLE;
      tidx     <= '0;
      turn_cnt <= '0;
      tx_reg   <= '0;
    end else begin
      unique case (tstate)
        T_IDLE: if (accept && needs_response(cmd)) begin
          tstate   <= T_TURN;
          tidx     <= '0;
          turn_cnt <= TW'(TURN_CYCLES);
        end
        T_TURN: if (turn_cnt == 0) tstate <= T_LOAD;
                else               turn_cnt <= turn_cnt - 1'b1;
        T_LOAD: begin
          tx_reg <= tx_src;
          tstate <= T_SEND;
        end
        T_SEND: tstate <= T_WAIT;
        T_WAIT: if (tx_done) begin
          if (tidx == 4'(N_RESP - 1)) tstate <= T_IDLE;
          else begin
            tidx   <= tidx + 4'd1;
            tstate <= T_LOAD;
          end
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- checks
  a_ind_onehot: assert property (@(posedge Sys_Clk) disable iff (Reset)
    $onehot0(ind));
  a_idle_high: assert property (@(posedge Sys_Clk) disable iff (Reset)
    !En_tx |-> Sout);
  a_msg_len: assert property (@(posedge Sys_Clk) disable iff (Reset)
    nwords inside {4'd3, 4'd5, 4'd11});

endmodule
