// w_bus: the 8-bit SAP-1 bus.
//
// Every register that can talk to the others drives this one bus: pc and the
// ir's address field (4 bits, on bus(3:0)), the memory, the accumulator and
// the adder/subtractor (8 bits). The notes give each driver a tri-state
// output with its own enable; here the same behaviour is a multiplexer
// selected by those enables (E_P, E_I, CE, E_A, E_U), which synthesizes on
// any target. A 4-bit driver puts zeros on bus(7:4). With no enable high the
// bus reads 0. Only one source may drive the bus in a clock cycle; an
// assertion checks that at most one enable is high.
module w_bus
  import sap1_pkg::*;
(
  input  logic              clk,
  input  logic              ep,
  input  logic [ADDR_W-1:0] pc_val,
  input  logic              ei,
  input  logic [ADDR_W-1:0] ir_addr,
  input  logic              ce,
  input  logic [DATA_W-1:0] mem_val,
  input  logic              ea,
  input  logic [DATA_W-1:0] acc_val,
  input  logic              eu,
  input  logic [DATA_W-1:0] alu_val,
  output logic [DATA_W-1:0] bus
);

  always_comb begin
    bus = '0;
    unique0 case (1'b1)
      ep: bus = DATA_W'(pc_val);
      ei: bus = DATA_W'(ir_addr);
      ce: bus = mem_val;
      ea: bus = acc_val;
      eu: bus = alu_val;
    endcase
  end

  // One source per clock cycle.
  a_one_driver: assert property (@(posedge clk) $onehot0({ep, ei, ce, ea, eu}))
    else $error("w_bus: more than one driver enabled");

endmodule
