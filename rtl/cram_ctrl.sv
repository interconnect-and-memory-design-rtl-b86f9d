// cram_ctrl: instruction decoder and controller of one CRAM bank.
//
// Takes the 32-bit CRAM instruction and turns it into the controls that the
// 256 compute peripherals and the arrays need in the same cycle: the three
// compute word-line addresses (RA, RB read; RD written), the array pair, and a
// cram_ctl_t word that sets the write-back multiplexer and the carry/tag latch
// updates. Decoding is purely combinational; the bank applies the result at the
// next rising clock edge, so every instruction takes exactly one cycle, as the
// single-cycle primitive set requires. The opcode encoding and enable-bit
// assignment are this design's choice (see cram_pkg).
module cram_ctrl
  import cram_pkg::*;
(
  input  logic [31:0] instr,
  input  logic        instr_valid,
  output logic        exec,
  output cram_ctl_t   ctl,
  output logic        side,
  output logic [7:0]  ra,
  output logic [7:0]  rb,
  output logic [7:0]  rd
);

  cram_instr_t i;
  assign i    = cram_instr_t'(instr);
  assign exec = instr_valid;
  assign side = i.en[EN_SIDE-28];
  assign ra   = i.ra;
  assign rb   = i.rb;
  assign rd   = i.rd;

  always_comb begin
    ctl         = '0;
    ctl.cond    = i.en[EN_COND-28];
    ctl.pattern = i.rb[0];
    ctl.wb_sel  = WB_A;
    ctl.c_sel   = C_HOLD;
    ctl.t_sel   = T_HOLD;
    unique case (i.op)
      OP_AND:     begin ctl.wb_en = 1'b1; ctl.wb_sel = WB_AND; end
      OP_OR:      begin ctl.wb_en = 1'b1; ctl.wb_sel = WB_OR;  end
      OP_NAND:    begin ctl.wb_en = 1'b1; ctl.wb_sel = WB_AND; ctl.wb_inv = 1'b1; end
      OP_NOR:     begin ctl.wb_en = 1'b1; ctl.wb_sel = WB_OR;  ctl.wb_inv = 1'b1; end
      OP_XOR:     begin ctl.wb_en = 1'b1; ctl.wb_sel = WB_XOR; end
      OP_XNOR:    begin ctl.wb_en = 1'b1; ctl.wb_sel = WB_XOR; ctl.wb_inv = 1'b1; end
      OP_ADD:     begin ctl.wb_en = 1'b1; ctl.wb_sel = WB_SUM; ctl.c_sel = C_COUT; end
      OP_COPY:    begin ctl.wb_en = 1'b1; ctl.wb_sel = WB_A; end
      OP_INV:     begin ctl.wb_en = 1'b1; ctl.wb_sel = WB_A;   ctl.wb_inv = 1'b1; end
      OP_EQUAL:   ctl.t_sel = T_EQ;
      OP_LOAD_T:  ctl.t_sel = T_A;
      OP_STORE_C: begin ctl.wb_en = 1'b1; ctl.wb_sel = WB_CARRY; end
      OP_STORE_T: begin ctl.wb_en = 1'b1; ctl.wb_sel = WB_TAG; end
      OP_SET_C:   ctl.c_sel = C_SET;
      OP_RESET_C: ctl.c_sel = C_CLR;
      OP_C_TO_T:  ctl.t_sel = T_C;
      default:    ;
    endcase
  end

endmodule
