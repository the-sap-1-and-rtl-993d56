// control_sequencer_tb: for each instruction (and an undefined opcode) clears
// the sequencer, presents the opcode and checks the control word in each of
// the six T-states, sampled just before the rising edge, over two
// instruction cycles. For hlt it checks that the sequencer stops in T4 and
// stays there with halted high.
module control_sequencer_tb;
  import sap1_pkg::*;
  import ctrl_ref_pkg::*;

  logic clk = 1'b0, clr = 1'b1;
  logic [OP_W-1:0] opcode = '0;
  ctrl_t ctrl, expected;
  logic [N_TSTATES-1:0] tstate;
  logic halted;
  int checks = 0, failures = 0;

  control_sequencer dut (.clk(clk), .clr(clr), .opcode(opcode), .ctrl(ctrl),
                         .tstate(tstate), .halted(halted));

  always #5 clk = ~clk;

  task automatic check_step(input int kind, input int step);
    expected = expected_ctrl(kind, step);
    checks++;
    if (ctrl !== expected || tstate !== N_TSTATES'(1 << (step - 1))) begin
      failures++;
      $display("FAIL kind %0d T%0d: ctrl=%b t=%b expected %b", kind, step, ctrl, tstate, expected);
    end
  endtask

  initial begin
    for (int kind = 0; kind < N_KINDS; kind++) begin
      @(negedge clk); clr = 1'b1; opcode = kind_opcode(kind);
      @(negedge clk); #1 clr = 1'b0;  // leave clr while the clock is low
      // The counter is in T1; each step is sampled 1 ns before its rising edge.
      if (kind != 4) begin
        for (int cyc = 0; cyc < 2; cyc++)
          for (int step = 1; step <= N_TSTATES; step++) begin
            if (cyc == 0 && step == 1) #3;
            else begin @(posedge clk); #9; end
            check_step(kind, step);
          end
      end else begin
        for (int step = 1; step <= 4; step++) begin
          if (step == 1) #3;
          else begin @(posedge clk); #9; end
          check_step(kind, step);
        end
        repeat (10) begin
          @(posedge clk); #9;
          check_step(kind, 4);
          checks++;
          if (!halted) begin failures++; $display("FAIL halted low"); end
        end
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
