// cram_pkg: types and constants shared by the Compute-SRAM (CRAM) blocks.
//
// A CRAM instruction is one 32-bit word executed by every compute row of a bank
// in a single cycle:
//   [31:28] enable bits   [27:24] opcode   [23:16] RA   [15:8] RB   [7:0] RD
// RA, RB and RD select compute word-lines (bit columns) of the 256-column
// arrays. The field layout follows the published format; the opcode numbers and
// the meaning of the individual enable bits are this design's own choice:
//   bit 28 (EN_COND) - conditional execution: write back only in rows whose tag
//                      latch holds 1; EQUAL and LOAD_T then AND into the tag.
//   bit 29 (EN_SIDE) - selects the right-hand array pair instead of the left.
//   bits 31:30       - unused.
package cram_pkg;

  localparam int unsigned ADDR_W  = 8;    // 256 compute word-lines per array
  localparam int unsigned EN_COND = 28;
  localparam int unsigned EN_SIDE = 29;

  // The sixteen single-cycle primitives.
  typedef enum logic [3:0] {
    OP_AND    = 4'h0,
    OP_OR     = 4'h1,
    OP_NAND   = 4'h2,
    OP_NOR    = 4'h3,
    OP_XOR    = 4'h4,
    OP_XNOR   = 4'h5,
    OP_ADD    = 4'h6,   // sum -> RD, carry latch <= carry out
    OP_COPY   = 4'h7,   // RA -> RD
    OP_INV    = 4'h8,   // ~RA -> RD
    OP_EQUAL  = 4'h9,   // tag <= (RA == RB[0])
    OP_LOAD_T = 4'hA,   // tag <= RA
    OP_STORE_C= 4'hB,   // carry -> RD
    OP_STORE_T= 4'hC,   // tag -> RD
    OP_SET_C  = 4'hD,   // carry <= 1
    OP_RESET_C= 4'hE,   // carry <= 0
    OP_C_TO_T = 4'hF    // tag <= carry
  } cram_op_e;

  // Source selected by the write-back multiplexer.
  typedef enum logic [2:0] {
    WB_AND, WB_OR, WB_XOR, WB_SUM, WB_A, WB_CARRY, WB_TAG
  } cram_wb_e;

  // Carry / tag latch next-value selection.
  typedef enum logic [1:0] { C_HOLD, C_COUT, C_SET, C_CLR } cram_c_e;
  typedef enum logic [1:0] { T_HOLD, T_EQ, T_A, T_C } cram_t_e;

  // Decoded per-row control, broadcast to every compute peripheral.
  typedef struct packed {
    logic     wb_en;     // write a bit back to RD
    cram_wb_e wb_sel;
    logic     wb_inv;    // invert the write-back bit (NAND, NOR, XNOR, INV)
    logic     cond;      // gate write-back (and tag updates) with the tag latch
    cram_c_e  c_sel;
    cram_t_e  t_sel;
    logic     pattern;   // search pattern bit for EQUAL (RB[0])
  } cram_ctl_t;

  typedef struct packed {
    logic [3:0]        en;
    cram_op_e          op;
    logic [ADDR_W-1:0] ra;
    logic [ADDR_W-1:0] rb;
    logic [ADDR_W-1:0] rd;
  } cram_instr_t;

  function automatic logic [31:0] mk_instr(cram_op_e op, logic [7:0] ra, logic [7:0] rb,
                                           logic [7:0] rd, logic cond = 1'b0, logic side = 1'b0);
    cram_instr_t i;
    i.en = '0;
    i.en[EN_COND-28] = cond;
    i.en[EN_SIDE-28] = side;
    i.op = op;
    i.ra = ra;
    i.rb = rb;
    i.rd = rd;
    return i;
  endfunction

endpackage
