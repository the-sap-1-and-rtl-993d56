// ring_counter_tb: checks that the T-state counter starts at T1 after clr,
// steps T1..T6 and back to T1 on falling edges only, holds while en is low,
// and restarts at T1 on clr.
module ring_counter_tb;
  import sap1_pkg::*;

  logic clk = 1'b0, clr = 1'b0, en = 1'b1;
  logic [N_TSTATES-1:0] t;
  int model = 0;   // 0 = T1 .. 5 = T6
  int checks = 0, failures = 0;

  ring_counter dut (.clk(clk), .clr(clr), .en(en), .t(t));

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (t !== N_TSTATES'(1 << model)) begin
      failures++;
      $display("FAIL %s: t=%b expected T%0d", what, t, model + 1);
    end
  endtask

  initial begin
    #1 clr = 1'b1;
    #1 check("clr -> T1");
    #10 clr = 1'b0;          // released while the clock is low
    for (int i = 0; i < 100; i++) begin
      @(posedge clk); #1;
      check("no change on rising edge");
      en = (i > 30) ? 1'($urandom_range(0, 3) != 0) : 1'b1;
      @(negedge clk); #1;
      if (en) model = (model + 1) % N_TSTATES;
      check("step on falling edge");
    end
    clr = 1'b1; #1; model = 0; check("async clr");
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
