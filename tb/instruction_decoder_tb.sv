// instruction_decoder_tb: applies all 16 opcodes and checks that exactly the
// matching instruction signal is raised for 0 (lda), 1 (add), 2 (sub),
// E (out), F (hlt), and none for the other eleven.
module instruction_decoder_tb;
  import sap1_pkg::*;

  logic [OP_W-1:0] opcode;
  instr_t instr;
  logic [4:0] expected;   // {lda, add, sub, out, hlt}
  int checks = 0, failures = 0;

  instruction_decoder dut (.opcode(opcode), .instr(instr));

  initial begin
    for (int op = 0; op < 16; op++) begin
      opcode = OP_W'(op);
      #1;
      case (op)
        0:  expected = 5'b10000;
        1:  expected = 5'b01000;
        2:  expected = 5'b00100;
        14: expected = 5'b00010;
        15: expected = 5'b00001;
        default: expected = 5'b00000;
      endcase
      checks++;
      if ({instr.lda, instr.add, instr.sub, instr.out, instr.hlt} !== expected) begin
        failures++;
        $display("FAIL opcode %0h: %b expected %b", op, instr, expected);
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
