// accumulator_tb: loads random bus values into the accumulator with random la enables and
// checks after every rising edge that it took the bus only when la was high,
// then checks that clr empties it.
module accumulator_tb;
  import sap1_pkg::*;

  logic clk = 1'b0, clr = 1'b1, la = 1'b0;
  logic [DATA_W-1:0] bus = '0;
  logic [DATA_W-1:0] acc_out;
  logic [DATA_W-1:0] model = '0;
  int checks = 0, failures = 0, loads = 0;

  accumulator dut (.clk(clk), .clr(clr), .la(la), .bus(bus), .acc_out(acc_out));

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (acc_out !== model) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, acc_out, model);
    end
  endtask

  initial begin
    #12 clr = 1'b0;
    check("after clr");
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      la  = 1'($urandom_range(0, 1));
      bus = DATA_W'($urandom);
      @(posedge clk); #1;
      if (la) begin model = bus[DATA_W-1:0]; loads++; end
      check("load/hold");
    end
    @(negedge clk);
    la = 1'b1; bus = 8'hA5;
    @(posedge clk); #1; model = bus[DATA_W-1:0]; check("load A5");
    @(negedge clk); clr = 1'b1; #1; model = '0; check("clr");
    @(negedge clk); clr = 1'b0; la = 1'b0;
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
