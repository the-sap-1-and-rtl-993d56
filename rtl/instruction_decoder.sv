// instruction_decoder: one "executing instruction X" signal per SAP-1
// instruction.
//
// Purely combinational decode of the opcode field ir(7:4) into the five
// signals lda, add, sub, out and hlt. At most one is high. An opcode that is
// none of the five raises none of them, so no control signal is asserted in
// T4..T6 and such a word acts as a do-nothing instruction.
module instruction_decoder
  import sap1_pkg::*;
(
  input  logic [OP_W-1:0] opcode,
  output instr_t          instr
);

  always_comb begin
    instr     = '0;
    instr.lda = (opcode == OP_LDA);
    instr.add = (opcode == OP_ADD);
    instr.sub = (opcode == OP_SUB);
    instr.out = (opcode == OP_OUT);
    instr.hlt = (opcode == OP_HLT);
  end

endmodule
