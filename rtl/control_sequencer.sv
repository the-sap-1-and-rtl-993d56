// control_sequencer: the SAP-1 control unit.
//
// Takes the opcode ir(7:4) and produces the 13 control signals. Inside are
// the falling-edge T-state ring counter (T1..T6), the instruction decoder and
// the control matrix. Every instruction takes all six T-states, used or not.
// Control signals change just after each falling clock edge and are acted on
// at the next rising edge. hlt is decoded in T4; it holds the ring counter in
// T4, so no further instruction is fetched until clr. halted reports that
// state. clr (asynchronous, active high) restarts the counter at T1.
// The falling-edge counter, the six fixed T-states and the 4-in / 13-out
// shape follow the classic SAP-1. Which 13 signals (the 12 datapath control
// points plus HLT) and halting by freezing the counter are this design's
// reading.
module control_sequencer
  import sap1_pkg::*;
(
  input  logic                 clk,
  input  logic                 clr,
  input  logic [OP_W-1:0]      opcode,
  output ctrl_t                ctrl,
  output logic [N_TSTATES-1:0] tstate,
  output logic                 halted
);

  instr_t instr;

  ring_counter u_ring (
    .clk (clk),
    .clr (clr),
    .en  (!ctrl.hlt),
    .t   (tstate)
  );

  instruction_decoder u_dec (
    .opcode (opcode),
    .instr  (instr)
  );

  control_matrix u_matrix (
    .t     (tstate),
    .instr (instr),
    .ctrl  (ctrl)
  );

  assign halted = ctrl.hlt;

endmodule
