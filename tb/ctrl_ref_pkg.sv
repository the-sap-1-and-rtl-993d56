// ctrl_ref_pkg: reference control-point table of the SAP-1, written step by
// step as an instruction listing (one row per instruction and T-state) for
// the testbenches to compare the sequencer against.
package ctrl_ref_pkg;
  import sap1_pkg::*;

  // Instruction index used by the testbenches: 0 lda, 1 add, 2 sub, 3 out,
  // 4 hlt, 5 an undefined opcode.
  localparam int N_KINDS = 6;

  function automatic logic [OP_W-1:0] kind_opcode(input int kind);
    case (kind)
      0: return 4'h0;
      1: return 4'h1;
      2: return 4'h2;
      3: return 4'hE;
      4: return 4'hF;
      default: return 4'h7;
    endcase
  endfunction

  // step: 1..6 for T1..T6
  function automatic ctrl_t expected_ctrl(input int kind, input int step);
    ctrl_t c = '0;
    case (step)
      1: begin c.ep = 1; c.lm = 1; end
      2: c.cp = 1;
      3: begin c.ce = 1; c.li = 1; end
      4: case (kind)
           0, 1, 2: begin c.ei = 1; c.lm = 1; end
           3:       begin c.ea = 1; c.lo = 1; end
           4:       c.hlt = 1;
           default: ;
         endcase
      5: case (kind)
           0:    begin c.ce = 1; c.la = 1; end
           1, 2: begin c.ce = 1; c.lb = 1; end
           default: ;
         endcase
      6: case (kind)
           1: begin c.eu = 1; c.la = 1; end
           2: begin c.su = 1; c.eu = 1; c.la = 1; end
           default: ;
         endcase
      default: ;
    endcase
    return c;
  endfunction
endpackage
