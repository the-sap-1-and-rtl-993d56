// accumulator: the 8-bit A register.
//
// Keeps the running result. When la is high it takes the bus on the next
// rising clock edge. Its value always feeds the first input of the
// adder/subtractor (acc_out), and is what the bus carries when E_A selects
// it (used by out to copy A into the output register). clr (asynchronous,
// active high) empties it. The register and L_A follow the notes; E_A and the
// clear are this design's choices.
module accumulator
  import sap1_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic              la,
  input  logic [DATA_W-1:0] bus,
  output logic [DATA_W-1:0] acc_out
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)     acc_out <= '0;
    else if (la) acc_out <= bus;
  end

endmodule
