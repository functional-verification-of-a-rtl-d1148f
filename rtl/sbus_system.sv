// sbus_system: one serial bus (SBUS) segment of the safety-class controller.
//
// The controller consists of one processor module (FPM) and up to 16 I/O
// modules that all talk to it over a single serial bus. Every I/O module
// carries an SBUS controller (sbus_ctrl). This top places N_SLOTS of them on
// one bus: the FPM's transmit line `Sin` is broadcast to every slot, and the
// slots' transmit lines are combined into `Sout` as an idle-high wired-AND,
// so whichever slot is answering (its En_tx high) drives the line. Slot k is
// given slot position k; the bus select is common to the segment. The FPM
// itself and the input/output circuits of the I/O modules (digital or
// analog, inputs or outputs) are not part of this design: their connections
// to each slot (status inputs, out/set outputs, command indicators) are
// brought out as per-slot ports.
//
// Timing is that of sbus_ctrl; combining the lines adds no clock delay.
// The slot count follows the published description (up to 16 I/O modules); the wired-AND
// bus, the slot numbering and a common module ID default (the example ID
// 16'h44F1 of a digital output module) are this design's choices.
module sbus_system
  import sbus_pkg::*;
#(
  parameter int unsigned            N_SLOTS      = 16,
  parameter int unsigned            CLKS_PER_BIT = 8,
  parameter logic [N_SLOTS*16-1:0]  MODULE_IDS   = {N_SLOTS{16'h44F1}}
) (
  input  logic       Sys_Clk,
  input  logic       Reset,                          // synchronous, active high
  input  logic [1:0] Sel_Bus,
  input  logic       Sin,                            // FPM -> I/O modules
  output logic       Sout,                           // I/O modules -> FPM
  input  word_t      Stat_Ireg [N_SLOTS][N_STAT],
  output word_t      Out_Ireg  [N_SLOTS][N_OUT],
  output word_t      Set_Ireg  [N_SLOTS][N_SET],
  output ind_t       Ind       [N_SLOTS],
  output logic [N_SLOTS-1:0] En_tx
);

  logic [N_SLOTS-1:0] slot_sout;

  for (genvar k = 0; k < N_SLOTS; k++) begin : g_slot
    sbus_ctrl #(
      .CLKS_PER_BIT(CLKS_PER_BIT),
      .MODULE_ID   (MODULE_IDS[16*k +: 16])
    ) u_ctrl (
      .Reset      (Reset),
      .Sys_Clk    (Sys_Clk),
      .Sel_Bus    (Sel_Bus),
      .Pos_Slot   (4'(k)),
      .Sin        (Sin),
      .Stat_Ireg  (Stat_Ireg[k]),
      .En_tx      (En_tx[k]),
      .Sout       (slot_sout[k]),
      .Ind_reg_set(Ind[k].set),
      .Ind_reg_out(Ind[k].out),
      .Ind_reg_chk(Ind[k].chk),
      .Ind_cmd_rst(Ind[k].rst),
      .Ind_cmd_clr(Ind[k].clr),
      .Ind_cmd_ena(Ind[k].ena),
      .Ind_cmd_dis(Ind[k].dis),
      .Out_Ireg   (Out_Ireg[k]),
      .Set_Ireg   (Set_Ireg[k])
    );
  end

  assign Sout = &slot_sout;

  a_one_talker: assert property (@(posedge Sys_Clk) disable iff (Reset)
    $onehot0(En_tx));

endmodule
