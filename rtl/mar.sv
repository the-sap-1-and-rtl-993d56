// mar: the 4-bit memory address register.
//
// It holds the address at the memory's input so that the bus is free for
// the memory's data. When lm is high it takes bus(3:0) on the next rising
// clock edge; otherwise it keeps its value. clr (asynchronous, active high)
// empties it. The register and its L_M control follow the notes; the clear
// is this design's reading of "clr ... empties other registers".
module mar
  import sap1_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic              lm,
  input  logic [DATA_W-1:0] bus,
  output logic [ADDR_W-1:0] addr
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)     addr <= '0;
    else if (lm) addr <= bus[ADDR_W-1:0];
  end

endmodule
