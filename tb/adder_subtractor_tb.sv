// adder_subtractor_tb: compares the unit with integer arithmetic modulo 256
// for every pair of operands, in add and in subtract mode.
module adder_subtractor_tb;
  import sap1_pkg::*;

  logic su;
  logic [DATA_W-1:0] a, b, sum;
  int checks = 0, failures = 0;
  int expected;

  adder_subtractor dut (.su(su), .a(a), .b(b), .sum(sum));

  initial begin
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          su = 1'(m); a = DATA_W'(i); b = DATA_W'(j);
          #1;
          expected = m ? (i - j + 256) % 256 : (i + j) % 256;
          checks++;
          if (int'(sum) != expected) begin
            failures++;
            if (failures < 10)
              $display("FAIL su=%0d %0d,%0d -> %0d expected %0d", m, i, j, sum, expected);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
