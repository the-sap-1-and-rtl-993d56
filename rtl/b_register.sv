// b_register: the 8-bit B register at the second input of the
// adder/subtractor.
//
// Holds the memory operand steady while the sum or difference is formed and
// driven onto the bus. When lb is high it takes the bus on the next rising
// clock edge. B never drives the bus. clr (asynchronous, active high)
// empties it.
module b_register
  import sap1_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic              lb,
  input  logic [DATA_W-1:0] bus,
  output logic [DATA_W-1:0] b_out
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)     b_out <= '0;
    else if (lb) b_out <= bus;
  end

endmodule
