// ram_tb: writes random words through the loading port, reads every address
// back through the CPU read port, rewrites a few and checks again.
module ram_tb;
  import sap1_pkg::*;

  logic clk = 1'b0, prog_we = 1'b0;
  logic [ADDR_W-1:0] addr = '0, prog_addr = '0;
  logic [DATA_W-1:0] prog_data = '0, rdata;
  logic [DATA_W-1:0] model [MEM_WORDS];
  int checks = 0, failures = 0;

  ram dut (.clk(clk), .addr(addr), .rdata(rdata), .prog_we(prog_we),
           .prog_addr(prog_addr), .prog_data(prog_data));

  always #5 clk = ~clk;

  task automatic write(input int a, input logic [DATA_W-1:0] d);
    @(negedge clk);
    prog_we = 1'b1; prog_addr = ADDR_W'(a); prog_data = d;
    @(posedge clk); #1;
    prog_we = 1'b0;
    model[a] = d;
  endtask

  task automatic read_all();
    for (int a = 0; a < MEM_WORDS; a++) begin
      addr = ADDR_W'(a); #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL M[%0d]=%0h expected %0h", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < MEM_WORDS; a++) write(a, DATA_W'($urandom));
    read_all();
    write(3, 8'h00); write(15, 8'hFF); write(0, 8'h5A);
    read_all();
    // prog_we low: no write
    @(negedge clk); prog_addr = 4'd7; prog_data = ~model[7];
    @(posedge clk); #1;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
