// program_counter: the 4-bit SAP-1 program counter.
//
// Holds the address of the next instruction. When cp is high, the count goes
// up by one on the next rising clock edge, and wraps from 1111 to 0000 as an
// ordinary counter does. clr (asynchronous, active high) sets it to 0.
// pc_out is the value the pc places on bus(3:0) when the bus selects it with
// E_P; the bus itself lives in w_bus. Counting on C_P, the wrap-around and
// clearing to zero follow the notes; making clr asynchronous is this design's
// choice.
module program_counter
  import sap1_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic              cp,
  output logic [ADDR_W-1:0] pc_out
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)     pc_out <= '0;
    else if (cp) pc_out <= pc_out + 1'b1;
  end

endmodule
