// ram: the 16x8 SAP-1 memory M[15:0](7:0).
//
// Holds both program and data. The CPU only reads it: rdata = M[addr] is
// combinational, and the bus passes it on when CE is high. The notes say the
// program is put into memory by hand; here that is a synchronous write port
// (prog_we, prog_addr, prog_data, written on the rising clock edge) that a
// loader or testbench uses while the computer is held in clr. The memory is
// not cleared: words that were never written hold whatever they held.
module ram
  import sap1_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  output logic [DATA_W-1:0]        rdata,
  input  logic                     prog_we,
  input  logic [$clog2(WORDS)-1:0] prog_addr,
  input  logic [DATA_W-1:0]        prog_data
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  assign rdata = mem[addr];

endmodule
