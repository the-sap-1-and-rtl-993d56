// sap1_tb: end-to-end test of the SAP-1 at its default sizes.
//
// Loads programs through the memory-loading port while clr is held, releases
// clr and runs the machine. An instruction-level reference model executes
// the same program; after each instruction (at the end of its T6) the
// accumulator and the output register are compared with the model, and the
// cycle at which hlt stops the machine is checked against six cycles per
// instruction plus three fetch cycles of the hlt. Programs:
//   1. the worked example   lda E / sub F / out / hlt  (0E 2F E0 F0)
//   2. the same with add, and a longer mixed program with an undefined opcode
//   3. a loop with no hlt, which makes the pc roll over from 1111 to 0000
//   4. random memory images, run for a fixed number of instructions
// Counts how often each mechanism happened (each instruction, an undefined
// opcode, pc roll-over, add carry-out, sub borrow) and fails if one never did.
module sap1_tb;
  import sap1_pkg::*;

  logic clk = 1'b0, clr = 1'b0, prog_we = 1'b0;
  logic [ADDR_W-1:0] prog_addr = '0;
  logic [DATA_W-1:0] prog_data = '0;
  logic [DATA_W-1:0] out_data;
  logic halted;

  sap1 dut (.clk(clk), .clr(clr), .prog_we(prog_we), .prog_addr(prog_addr),
            .prog_data(prog_data), .out_data(out_data), .halted(halted));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Reference state
  logic [DATA_W-1:0] img [MEM_WORDS];
  logic [DATA_W-1:0] m_a, m_out;
  int m_pc;
  bit m_halt;

  // Mechanism counters
  int n_lda = 0, n_add = 0, n_sub = 0, n_out = 0, n_hlt = 0, n_bad = 0;
  int n_roll = 0, n_carry = 0, n_borrow = 0, n_fetch = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // One instruction of the reference machine.
  task automatic model_step();
    logic [DATA_W-1:0] ir, opnd;
    ir   = img[m_pc];
    opnd = img[ir[3:0]];
    m_pc = (m_pc + 1) % MEM_WORDS;
    case (ir[7:4])
      4'h0: m_a = opnd;
      4'h1: m_a = DATA_W'(int'(m_a) + int'(opnd));
      4'h2: m_a = DATA_W'(int'(m_a) - int'(opnd));
      4'hE: m_out = m_a;
      4'hF: m_halt = 1'b1;
      default: ;
    endcase
  endtask

  task automatic load_and_clear();
    @(negedge clk);
    clr = 1'b1;
    for (int a = 0; a < MEM_WORDS; a++) begin
      prog_we = 1'b1; prog_addr = ADDR_W'(a); prog_data = img[a];
      @(negedge clk);
    end
    prog_we = 1'b0;
    checks++;
    if (out_data !== '0 || dut.u_acc.acc_out !== '0 || dut.u_pc.pc_out !== '0)
      fail("clr did not clear pc, A and the output register");
    #1 clr = 1'b0;   // released while the clock is low: the next rising edge is in T1
    m_pc = 0; m_a = '0; m_out = '0; m_halt = 1'b0;
  endtask

  // Runs until hlt or max_instr instructions; returns instructions executed.
  task automatic run(input string name, input int max_instr, input bit expect_halt);
    int cycles = 0, n = 0;
    while (1) begin
      @(posedge clk); cycles++; #1;
      if (halted) begin
        model_step();
        checks++;
        if (!m_halt) fail($sformatf("%s: halted, but instruction %0d is not hlt", name, n));
        checks++;
        if (cycles != 6 * n + 4)
          fail($sformatf("%s: halted at cycle %0d, expected %0d", name, cycles, 6 * n + 4));
        // stays halted, outputs frozen
        repeat (12) @(posedge clk);
        #1;
        checks++;
        if (!halted || out_data !== m_out || dut.u_acc.acc_out !== m_a)
          fail($sformatf("%s: state changed after hlt", name));
        break;
      end
      if (dut.u_seq.tstate[N_TSTATES-1]) begin   // end of T6: instruction done
        model_step();
        n++;
        checks++;
        if (m_halt) fail($sformatf("%s: hlt did not stop the machine", name));
        checks++;
        if (dut.u_acc.acc_out !== m_a || out_data !== m_out)
          fail($sformatf("%s: after instr %0d A=%0h out=%0h, expected A=%0h out=%0h",
                         name, n, dut.u_acc.acc_out, out_data, m_a, m_out));
        checks++;
        if (cycles != 6 * n) fail($sformatf("%s: instr %0d ended at cycle %0d", name, n, cycles));
        if (n >= max_instr) break;
      end
      if (cycles > 6 * max_instr + 10) begin fail({name, ": ran away"}); break; end
    end
    checks++;
    if (expect_halt && !m_halt) fail({name, ": expected to halt"});
  endtask

  // Mechanism monitor, independent of the checks above.
  logic [ADDR_W-1:0] pc_prev = '0;
  always @(posedge clk) begin
    if (!clr) begin
      if (dut.u_seq.tstate[2] && !halted) n_fetch++;
      if (dut.u_seq.tstate[3]) begin
        case (dut.opcode)
          4'h0: n_lda++;
          4'h1: begin
            n_add++;
            if (int'(dut.acc_val) + int'(dut.u_ram.mem[dut.ir_addr]) > 255) n_carry++;
          end
          4'h2: begin
            n_sub++;
            if (dut.acc_val < dut.u_ram.mem[dut.ir_addr]) n_borrow++;
          end
          4'hE: n_out++;
          4'hF: ;
          default: n_bad++;
        endcase
      end
      if (pc_prev == 4'hF && dut.pc_val == 4'h0) n_roll++;
    end
    pc_prev <= dut.pc_val;
  end
  always @(posedge halted) n_hlt++;

  task automatic fill_random();
    for (int a = 0; a < MEM_WORDS; a++) img[a] = DATA_W'($urandom);
  endtask

  initial begin
    // 1. worked example, several data values
    for (int k = 0; k < 4; k++) begin
      fill_random();
      img[0] = 8'h0E; img[1] = 8'h2F; img[2] = 8'hE0; img[3] = 8'hF0;
      if (k == 0) begin img[14] = 8'h10; img[15] = 8'h0E; end   // 16 - 14 = 2
      if (k == 1) begin img[14] = 8'h05; img[15] = 8'h07; end   // borrow: 0xFE
      load_and_clear();
      run("example", 10, 1'b1);
      checks++;
      if (out_data !== DATA_W'(int'(img[14]) - int'(img[15])))
        fail($sformatf("example: out=%0h", out_data));
    end
    // 2a. add version
    fill_random();
    img[0] = 8'h0E; img[1] = 8'h1F; img[2] = 8'hE0; img[3] = 8'hF0;
    img[14] = 8'hF0; img[15] = 8'h20;   // carry out: 0x10
    load_and_clear();
    run("add", 10, 1'b1);
    checks++;
    if (out_data !== 8'h10) fail($sformatf("add: out=%0h expected 10", out_data));
    // 2b. mixed program with an undefined opcode (7) in the middle
    fill_random();
    img[0] = 8'h0D; img[1] = 8'h1E; img[2] = 8'hE0; img[3] = 8'h75;
    img[4] = 8'h2F; img[5] = 8'hE0; img[6] = 8'h1F; img[7] = 8'h1F;
    img[8] = 8'hE0; img[9] = 8'hF0;
    img[13] = 8'd100; img[14] = 8'd27; img[15] = 8'd3;
    load_and_clear();
    run("mixed", 20, 1'b1);
    checks++;
    if (out_data !== 8'd130) fail($sformatf("mixed: out=%0d expected 130", out_data));
    // 3. loop with no hlt: add F, out, then undefined opcodes up to F; pc rolls over
    for (int a = 0; a < MEM_WORDS; a++) img[a] = 8'h30;
    img[0] = 8'h1F; img[1] = 8'hE0;
    load_and_clear();
    run("rollover", 3 * MEM_WORDS + 2, 1'b0);
    checks++;
    if (out_data !== 8'h30 * 4) fail($sformatf("rollover: out=%0h", out_data));
    // 4. random memory images
    for (int k = 0; k < 40; k++) begin
      fill_random();
      load_and_clear();
      run($sformatf("random%0d", k), 40, 1'b0);
    end
    // mechanism coverage
    $display("mechanisms: fetch=%0d lda=%0d add=%0d sub=%0d out=%0d hlt=%0d undefined=%0d pc_rollover=%0d add_carry=%0d sub_borrow=%0d",
             n_fetch, n_lda, n_add, n_sub, n_out, n_hlt, n_bad, n_roll, n_carry, n_borrow);
    checks++; if (n_fetch == 0)  fail("no fetch");
    checks++; if (n_lda == 0)    fail("no lda");
    checks++; if (n_add == 0)    fail("no add");
    checks++; if (n_sub == 0)    fail("no sub");
    checks++; if (n_out == 0)    fail("no out");
    checks++; if (n_hlt == 0)    fail("no hlt");
    checks++; if (n_bad == 0)    fail("no undefined opcode");
    checks++; if (n_roll == 0)   fail("no pc rollover");
    checks++; if (n_carry == 0)  fail("no add carry-out");
    checks++; if (n_borrow == 0) fail("no sub borrow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
