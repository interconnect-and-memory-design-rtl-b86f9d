// tb_cram_ctrl: checks the instruction field split (RA, RB, RD, array pair,
// conditional bit, search pattern) and the decoded control word of all sixteen
// opcodes against a table written from the instruction set.
`timescale 1ns/1ps
module tb_cram_ctrl;
  import cram_pkg::*;
  logic [31:0] instr;
  logic instr_valid, exec, side;
  cram_ctl_t ctl;
  logic [7:0] ra, rb, rd;
  cram_ctrl dut (.*);
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // expected: wb_en, wb_sel, wb_inv, c_sel, t_sel
    for (int o = 0; o < 16; o++) begin
      logic en, inv; cram_wb_e sel; cram_c_e cs; cram_t_e ts;
      en = 1; inv = 0; sel = WB_A; cs = C_HOLD; ts = T_HOLD;
      case (cram_op_e'(o))
        OP_AND: sel = WB_AND;  OP_OR: sel = WB_OR;
        OP_NAND: begin sel = WB_AND; inv = 1; end
        OP_NOR:  begin sel = WB_OR;  inv = 1; end
        OP_XOR: sel = WB_XOR;
        OP_XNOR: begin sel = WB_XOR; inv = 1; end
        OP_ADD: begin sel = WB_SUM; cs = C_COUT; end
        OP_COPY: sel = WB_A;
        OP_INV: inv = 1;
        OP_EQUAL: begin en = 0; ts = T_EQ; end
        OP_LOAD_T: begin en = 0; ts = T_A; end
        OP_STORE_C: sel = WB_CARRY;
        OP_STORE_T: sel = WB_TAG;
        OP_SET_C: begin en = 0; cs = C_SET; end
        OP_RESET_C: begin en = 0; cs = C_CLR; end
        default: begin en = 0; ts = T_C; end
      endcase
      for (int k = 0; k < 4; k++) begin
        logic [7:0] xa, xb, xd; logic c, s;
        xa = 8'($urandom); xb = 8'($urandom); xd = 8'($urandom); c = 1'($urandom); s = 1'($urandom);
        instr = {2'b00, s, c, 4'(o), xa, xb, xd};
        instr_valid = 1'($urandom);
        #1;
        check(ra == xa && rb == xb && rd == xd && side == s && exec == instr_valid, "fields");
        check(ctl.cond == c && ctl.pattern == xb[0], "cond/pattern");
        check(ctl.wb_en == en && ctl.wb_inv == inv && ctl.c_sel == cs && ctl.t_sel == ts &&
              (!en || ctl.wb_sel == sel), $sformatf("decode of opcode %0d", o));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
