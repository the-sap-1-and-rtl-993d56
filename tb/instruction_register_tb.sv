// instruction_register_tb: loads random instruction words with random L_I
// enables and checks that the opcode field (7:4) and the address field (3:0)
// come out as loaded, are held while L_I is low, and are cleared by clr.
module instruction_register_tb;
  import sap1_pkg::*;

  logic clk = 1'b0, clr = 1'b1, li = 1'b0;
  logic [DATA_W-1:0] bus = '0, model = '0;
  logic [OP_W-1:0]   opcode;
  logic [ADDR_W-1:0] operand;
  int checks = 0, failures = 0;

  instruction_register dut (.clk(clk), .clr(clr), .li(li), .bus(bus),
                            .opcode(opcode), .operand(operand));

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (opcode !== model[7:4] || operand !== model[3:0]) begin
      failures++;
      $display("FAIL %s: op=%0h addr=%0h expected %0h", what, opcode, operand, model);
    end
  endtask

  initial begin
    #12 clr = 1'b0;
    check("after clr");
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      li  = 1'($urandom_range(0, 1));
      bus = DATA_W'($urandom);
      @(posedge clk); #1;
      if (li) model = bus;
      check("load/hold");
    end
    @(negedge clk); li = 1'b1; bus = 8'h2F;
    @(posedge clk); #1; model = 8'h2F; check("sub F");
    @(negedge clk); clr = 1'b1; #1; model = '0; check("clr");
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
