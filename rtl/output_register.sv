// output_register: the 8-bit register behind the SAP-1 display.
//
// The out instruction copies A into it; it then holds the value for the
// display (eight LEDs, one per bit of out_data) until the next out. When lo is
// high it takes the bus on the next rising clock edge. clr (asynchronous,
// active high) empties it.
module output_register
  import sap1_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic              lo,
  input  logic [DATA_W-1:0] bus,
  output logic [DATA_W-1:0] out_data
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)     out_data <= '0;
    else if (lo) out_data <= bus;
  end

endmodule
