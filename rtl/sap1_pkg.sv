// sap1_pkg: widths, opcodes and the control word shared by the SAP-1 blocks.
//
// An instruction is one 8-bit word: bits 7:4 are the opcode, bits 3:0 the
// address of the operand in the 16x8 memory. The five instructions are lda,
// add, sub, out and hlt. The codes of lda (0), sub (2) and out (E) follow the
// worked assembly example (lda -> 0x, sub -> 2F, out -> E0); add = 1 and
// hlt = F are this design's choice, made to keep the classic SAP-1 numbering.
//
// The control word holds the 13 control points driven by the sequencer. Twelve
// drive the datapath; hlt stops the T-state counter.
package sap1_pkg;

  localparam int unsigned DATA_W  = 8;                 // bus, memory word, registers
  localparam int unsigned ADDR_W  = 4;                 // pc, mar, address field
  localparam int unsigned OP_W    = 4;                 // opcode field
  localparam int unsigned MEM_WORDS = 1 << ADDR_W;     // 16 words
  localparam int unsigned N_TSTATES = 6;               // T1..T6

  typedef enum logic [OP_W-1:0] {
    OP_LDA = 4'h0,
    OP_ADD = 4'h1,
    OP_SUB = 4'h2,
    OP_OUT = 4'hE,
    OP_HLT = 4'hF
  } opcode_e;

  // One-hot "executing instruction X" signals from the decoder.
  typedef struct packed {
    logic lda;
    logic add;
    logic sub;
    logic out;
    logic hlt;
  } instr_t;

  // Control points. All are active high.
  typedef struct packed {
    logic cp;   // pc <- pc + 1
    logic ep;   // pc drives bus(3:0)
    logic lm;   // mar <- bus(3:0)
    logic ce;   // M[mar] drives bus
    logic li;   // ir <- bus
    logic ei;   // ir(3:0) drives bus(3:0)
    logic la;   // A <- bus
    logic ea;   // A drives bus
    logic su;   // adder/subtractor subtracts
    logic eu;   // adder/subtractor drives bus
    logic lb;   // B <- bus
    logic lo;   // output register <- bus
    logic hlt;  // stop the T-state counter
  } ctrl_t;

endpackage
