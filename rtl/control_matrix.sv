// control_matrix: the control-point equations of the SAP-1 sequencer.
//
// Combinational. Inputs are the one-hot T-state (t[0] = T1 .. t[5] = T6)
// and the decoded instruction; the output is the 13-signal control word.
//   T1  E_P, L_M          mar <- pc
//   T2  C_P               pc  <- pc + 1
//   T3  CE, L_I           ir  <- M[mar]
//   T4  lda/add/sub: E_I, L_M    mar <- ir(3:0)
//       out: E_A, L_O            out <- A
//       hlt: HLT                 stop
//   T5  lda: CE, L_A             A <- M[mar]
//       add/sub: CE, L_B         B <- M[mar]
//   T6  add: E_U, L_A            A <- A + B
//       sub: SU, E_U, L_A        A <- A - B
// Unused execute states assert nothing. The fetch steps and those of sub
// follow the notes; the steps of lda, add, out and hlt are built from the
// datapath in the same way and are this design's reading.
module control_matrix
  import sap1_pkg::*;
(
  input  logic [N_TSTATES-1:0] t,
  input  instr_t               instr,
  output ctrl_t                ctrl
);

  logic mem_op;   // an instruction with a memory operand

  always_comb begin
    mem_op   = instr.lda | instr.add | instr.sub;
    ctrl     = '0;
    ctrl.ep  = t[0];
    ctrl.cp  = t[1];
    ctrl.lm  = t[0] | (t[3] & mem_op);
    ctrl.ce  = t[2] | (t[4] & mem_op);
    ctrl.li  = t[2];
    ctrl.ei  = t[3] & mem_op;
    ctrl.ea  = t[3] & instr.out;
    ctrl.lo  = t[3] & instr.out;
    ctrl.hlt = t[3] & instr.hlt;
    ctrl.lb  = t[4] & (instr.add | instr.sub);
    ctrl.la  = (t[4] & instr.lda) | (t[5] & (instr.add | instr.sub));
    ctrl.eu  = t[5] & (instr.add | instr.sub);
    ctrl.su  = t[5] & instr.sub;
  end

endmodule
