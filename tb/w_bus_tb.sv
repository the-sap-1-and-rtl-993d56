// w_bus_tb: enables each bus source alone with random values and checks that
// the bus carries that source (zero-extended for the 4-bit pc and ir
// address), and that an idle bus reads zero.
module w_bus_tb;
  import sap1_pkg::*;

  logic clk = 1'b0;
  logic ep = 0, ei = 0, ce = 0, ea = 0, eu = 0;
  logic [ADDR_W-1:0] pc_val = '0, ir_addr = '0;
  logic [DATA_W-1:0] mem_val = '0, acc_val = '0, alu_val = '0, bus;
  logic [DATA_W-1:0] expected;
  int checks = 0, failures = 0;

  w_bus dut (.clk(clk), .ep(ep), .pc_val(pc_val), .ei(ei), .ir_addr(ir_addr),
             .ce(ce), .mem_val(mem_val), .ea(ea), .acc_val(acc_val),
             .eu(eu), .alu_val(alu_val), .bus(bus));

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      pc_val  = ADDR_W'($urandom); ir_addr = ADDR_W'($urandom);
      mem_val = DATA_W'($urandom); acc_val = DATA_W'($urandom);
      alu_val = DATA_W'($urandom);
      {ep, ei, ce, ea, eu} = '0;
      case (i % 6)
        0: begin ep = 1; expected = {4'h0, pc_val}; end
        1: begin ei = 1; expected = {4'h0, ir_addr}; end
        2: begin ce = 1; expected = mem_val; end
        3: begin ea = 1; expected = acc_val; end
        4: begin eu = 1; expected = alu_val; end
        default: expected = '0;
      endcase
      #1;
      checks++;
      if (bus !== expected) begin
        failures++;
        $display("FAIL case %0d: bus=%0h expected %0h", i % 6, bus, expected);
      end
    end
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
