// program_counter_tb: drives random C_P pulses and a mid-run clear into the
// program counter and compares it with a reference count after every rising
// edge, including the 1111 -> 0000 wrap.
module program_counter_tb;
  import sap1_pkg::*;

  logic clk = 1'b0, clr = 1'b1, cp = 1'b0;
  logic [ADDR_W-1:0] pc_out;
  int unsigned model = 0;
  int checks = 0, failures = 0, wraps = 0;

  program_counter dut (.clk(clk), .clr(clr), .cp(cp), .pc_out(pc_out));

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (pc_out !== ADDR_W'(model)) begin
      failures++;
      $display("FAIL %s: pc=%0d expected %0d", what, pc_out, model);
    end
  endtask

  initial begin
    #12 clr = 1'b0;
    check("after clr");
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      cp = (i < 40) ? 1'b1 : 1'($urandom_range(0, 1));
      @(posedge clk); #1;
      if (cp) begin
        if (model == 15) wraps++;
        model = (model + 1) % 16;
      end
      check("count");
    end
    @(negedge clk); clr = 1'b1; #1; model = 0; check("async clr");
    @(negedge clk); clr = 1'b0; cp = 1'b1;
    @(posedge clk); #1; model = 1; check("count after clr");
    checks++;
    if (wraps < 2) begin failures++; $display("FAIL wrap never seen"); end
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
