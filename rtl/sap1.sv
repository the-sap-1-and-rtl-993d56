// sap1: the Simple-As-Possible-1 computer.
//
// An 8-bit accumulator machine with a 16x8 memory holding program and data.
// Registers pc, mar, ir, A, B and the output register talk over one 8-bit
// bus; the control sequencer steps every instruction through six T-states
// (three to fetch, three to execute) and drives the 13 control points.
//
// Ports:
//   clk, clr            clock; clr (active high) clears pc, the registers and
//                       the T-state counter. Hold clr while loading memory.
//   prog_we/addr/data   loads a word into memory on the rising clock edge
//   out_data            the output register, i.e. the eight display LEDs
//   halted              high once a hlt instruction has executed
// Timing: one instruction is six clock cycles. The sequencer works on the
// falling edge, every register on the rising edge. Release clr while clk is
// low, so that the first rising edge falls in T1.
// The block structure, the bus, the instruction format and the T-state
// sequence follow the classic SAP-1. The memory-loading port, the halted
// output and the multiplexed (rather than tri-state) bus are this design's
// choices.
module sap1
  import sap1_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic              prog_we,
  input  logic [ADDR_W-1:0] prog_addr,
  input  logic [DATA_W-1:0] prog_data,
  output logic [DATA_W-1:0] out_data,
  output logic              halted
);

  ctrl_t                ctrl;
  logic [N_TSTATES-1:0] tstate;
  logic [DATA_W-1:0]    bus;
  logic [ADDR_W-1:0]    pc_val;
  logic [ADDR_W-1:0]    mar_addr;
  logic [DATA_W-1:0]    mem_val;
  logic [OP_W-1:0]      opcode;
  logic [ADDR_W-1:0]    ir_addr;
  logic [DATA_W-1:0]    acc_val;
  logic [DATA_W-1:0]    b_val;
  logic [DATA_W-1:0]    alu_val;

  control_sequencer u_seq (
    .clk    (clk),
    .clr    (clr),
    .opcode (opcode),
    .ctrl   (ctrl),
    .tstate (tstate),
    .halted (halted)
  );

  w_bus u_bus (
    .clk     (clk),
    .ep      (ctrl.ep),
    .pc_val  (pc_val),
    .ei      (ctrl.ei),
    .ir_addr (ir_addr),
    .ce      (ctrl.ce),
    .mem_val (mem_val),
    .ea      (ctrl.ea),
    .acc_val (acc_val),
    .eu      (ctrl.eu),
    .alu_val (alu_val),
    .bus     (bus)
  );

  program_counter u_pc (
    .clk    (clk),
    .clr    (clr),
    .cp     (ctrl.cp),
    .pc_out (pc_val)
  );

  mar u_mar (
    .clk  (clk),
    .clr  (clr),
    .lm   (ctrl.lm),
    .bus  (bus),
    .addr (mar_addr)
  );

  ram u_ram (
    .clk       (clk),
    .addr      (mar_addr),
    .rdata     (mem_val),
    .prog_we   (prog_we),
    .prog_addr (prog_addr),
    .prog_data (prog_data)
  );

  instruction_register u_ir (
    .clk     (clk),
    .clr     (clr),
    .li      (ctrl.li),
    .bus     (bus),
    .opcode  (opcode),
    .operand (ir_addr)
  );

  accumulator u_acc (
    .clk     (clk),
    .clr     (clr),
    .la      (ctrl.la),
    .bus     (bus),
    .acc_out (acc_val)
  );

  b_register u_b (
    .clk   (clk),
    .clr   (clr),
    .lb    (ctrl.lb),
    .bus   (bus),
    .b_out (b_val)
  );

  adder_subtractor u_alu (
    .su  (ctrl.su),
    .a   (acc_val),
    .b   (b_val),
    .sum (alu_val)
  );

  output_register u_out (
    .clk      (clk),
    .clr      (clr),
    .lo       (ctrl.lo),
    .bus      (bus),
    .out_data (out_data)
  );

endmodule
