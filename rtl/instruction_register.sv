// instruction_register: the 8-bit SAP-1 instruction register (ir).
//
// When li is high it takes the whole bus on the next rising clock edge.
// The opcode field ir(7:4) goes to the control sequencer; the address field
// ir(3:0) is what the ir places on bus(3:0) when E_I selects it, so that
// lda/add/sub can move their operand address into the mar. clr
// (asynchronous, active high) empties it, which decodes as lda 0 until the
// first fetch has loaded a real instruction.
module instruction_register
  import sap1_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic              li,
  input  logic [DATA_W-1:0] bus,
  output logic [OP_W-1:0]   opcode,
  output logic [ADDR_W-1:0] operand
);

  logic [DATA_W-1:0] ir_q;

  always_ff @(posedge clk or posedge clr) begin
    if (clr)     ir_q <= '0;
    else if (li) ir_q <= bus;
  end

  assign opcode  = ir_q[DATA_W-1 -: OP_W];
  assign operand = ir_q[ADDR_W-1:0];

endmodule
