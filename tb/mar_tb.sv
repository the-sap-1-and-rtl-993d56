// mar_tb: loads random bus values into the mar with random lm enables and
// checks after every rising edge that it took the bus only when lm was high,
// then checks that clr empties it.
module mar_tb;
  import sap1_pkg::*;

  logic clk = 1'b0, clr = 1'b1, lm = 1'b0;
  logic [DATA_W-1:0] bus = '0;
  logic [ADDR_W-1:0] addr;
  logic [ADDR_W-1:0] model = '0;
  int checks = 0, failures = 0, loads = 0;

  mar dut (.clk(clk), .clr(clr), .lm(lm), .bus(bus), .addr(addr));

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (addr !== model) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, addr, model);
    end
  endtask

  initial begin
    #12 clr = 1'b0;
    check("after clr");
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      lm  = 1'($urandom_range(0, 1));
      bus = DATA_W'($urandom);
      @(posedge clk); #1;
      if (lm) begin model = bus[ADDR_W-1:0]; loads++; end
      check("load/hold");
    end
    @(negedge clk);
    lm = 1'b1; bus = 8'hA5;
    @(posedge clk); #1; model = bus[ADDR_W-1:0]; check("load A5");
    @(negedge clk); clr = 1'b1; #1; model = '0; check("clr");
    @(negedge clk); clr = 1'b0; lm = 1'b0;
    checks++;
    if (loads == 0) begin failures++; $display("FAIL no load exercised"); end
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
