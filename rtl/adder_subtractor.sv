// adder_subtractor: the combinational SAP-1 arithmetic unit.
//
// sum = a + b when su is low and a - b when su is high, both modulo 256.
// Subtraction is done as a + ~b + 1 (two's complement) so one adder serves
// both. The result is available as soon as the logic settles; the bus passes
// it on when E_U is high, and A loads it on the next rising edge. No carry or
// other flag is kept, since no instruction of this machine reads one.
module adder_subtractor
  import sap1_pkg::*;
(
  input  logic              su,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] sum
);

  logic [DATA_W-1:0] b_eff;

  always_comb begin
    b_eff = su ? ~b : b;
    sum   = a + b_eff + DATA_W'(su);
  end

endmodule
