// control_matrix_tb: applies every T-state with every instruction (and an
// undefined opcode) and compares the 13 control points with the reference
// control-point table.
module control_matrix_tb;
  import sap1_pkg::*;
  import ctrl_ref_pkg::*;

  logic [N_TSTATES-1:0] t;
  instr_t instr;
  ctrl_t  ctrl, expected;
  int checks = 0, failures = 0;

  control_matrix dut (.t(t), .instr(instr), .ctrl(ctrl));

  initial begin
    for (int kind = 0; kind < N_KINDS; kind++)
      for (int step = 1; step <= N_TSTATES; step++) begin
        instr = '0;
        case (kind)
          0: instr.lda = 1;
          1: instr.add = 1;
          2: instr.sub = 1;
          3: instr.out = 1;
          4: instr.hlt = 1;
          default: ;
        endcase
        t = N_TSTATES'(1 << (step - 1));
        #1;
        expected = expected_ctrl(kind, step);
        checks++;
        if (ctrl !== expected) begin
          failures++;
          $display("FAIL kind %0d T%0d: %b expected %b", kind, step, ctrl, expected);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
