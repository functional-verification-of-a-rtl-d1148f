// sbus_pkg: shared types and constants of the SBUS slave controller.
//
// A message from the processor module is a sequence of 16-bit words:
//   FUNCTION, ID, DATA[0..n-1], CRC     with n = 8 (set), 2 (out), 0 (others).
// FUNCTION holds an 8-bit command, a 2-bit bus select and a 4-bit slot
// position; the two remaining bits are zero. The field widths and the word
// structure follow the published description. The bit positions below
// (sel_bus in [14:13], pos_slot in [11:8], command in [7:0], zeros in bits 15
// and 12) are inferred from a logged example word, 16'h6540, seen with bus
// select 3 and slot 5; the command codes are this design's own choice.
//
// The CRC is CRC-16 with polynomial x^16+x^12+x^5+1 (0x1021), initial value
// 16'hFFFF, processed MSB first one 16-bit word at a time. The polynomial is
// this design's choice.
package sbus_pkg;

  localparam int unsigned WORD_W     = 16;
  localparam int unsigned N_REC      = 10;  // REC_reg00..09
  localparam int unsigned N_STAT     = 6;   // Stat_Ireg00..05
  localparam int unsigned N_OUT      = 2;   // Out_Ireg00..01
  localparam int unsigned N_SET      = 8;   // Set_Ireg00..07
  localparam int unsigned N_DATA_SET = 8;   // DATA words of a set message
  localparam int unsigned N_DATA_OUT = 2;   // DATA words of an out message
  localparam int unsigned N_RESP     = 2 + N_STAT + 1;  // response words

  typedef logic [WORD_W-1:0] word_t;

  localparam word_t CRC_INIT = 16'hFFFF;
  localparam word_t CRC_POLY = 16'h1021;

  // Command codes (FUNCTION[7:0]).
  typedef enum logic [7:0] {
    CMD_SET      = 8'h01,
    CMD_OUT      = 8'h02,
    CMD_CHECK_ID = 8'h04,
    CMD_RESET    = 8'h08,
    CMD_CLEAR    = 8'h10,
    CMD_ENABLE   = 8'h20,
    CMD_DISABLE  = 8'h40
  } cmd_e;

  // Byte offsets of the controller's registers in its register map.
  // All are 16 bits wide, read/write, reset value 16'h0000.
  localparam logic [7:0] OFS_REC00 = 8'h00;  // REC_reg_k at 4*k, k = 0..9
  localparam logic [7:0] OFS_CRC   = 8'h28;
  localparam logic [7:0] OFS_TX    = 8'h2C;

  // One-cycle command indicators, one bit per command.
  typedef struct packed {
    logic set;
    logic out;
    logic chk;
    logic rst;
    logic clr;
    logic ena;
    logic dis;
  } ind_t;

  // FUNCTION word fields.
  function automatic logic [7:0] fn_command(word_t f);
    return f[7:0];
  endfunction

  function automatic logic [1:0] fn_sel_bus(word_t f);
    return f[14:13];
  endfunction

  function automatic logic [3:0] fn_pos_slot(word_t f);
    return f[11:8];
  endfunction

  function automatic word_t make_function(logic [7:0] cmd, logic [1:0] sel_bus,
                                          logic [3:0] pos_slot);
    return {1'b0, sel_bus, 1'b0, pos_slot, cmd};
  endfunction

  // Number of DATA words that follow ID for a given command.
  function automatic int unsigned data_words(logic [7:0] cmd);
    case (cmd)
      CMD_SET: return N_DATA_SET;
      CMD_OUT: return N_DATA_OUT;
      default: return 0;
    endcase
  endfunction

  // True for the commands that are answered with a response message.
  function automatic logic needs_response(logic [7:0] cmd);
    return (cmd == CMD_SET) || (cmd == CMD_OUT) || (cmd == CMD_CHECK_ID);
  endfunction

  function automatic logic is_known_cmd(logic [7:0] cmd);
    case (cmd)
      CMD_SET, CMD_OUT, CMD_CHECK_ID, CMD_RESET, CMD_CLEAR, CMD_ENABLE,
      CMD_DISABLE: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // CRC of one more 16-bit word, MSB first.
  function automatic word_t crc16_word(word_t crc, word_t data);
    word_t c;
    c = crc;
    for (int i = WORD_W - 1; i >= 0; i--) begin
      if (c[WORD_W-1] ^ data[i]) c = (c << 1) ^ CRC_POLY;
      else                       c = c << 1;
    end
    return c;
  endfunction

endpackage
