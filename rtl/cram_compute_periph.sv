// cram_compute_periph: the near-memory logic at the end of every compute
// bit-line of a CRAM bank (one slice per row, ROWS slices side by side).
//
// When two compute word-lines (RA and RB) are raised together, the precharged
// compute bit-line CBL can only stay high if both cells hold 1, and CBLB only
// if both hold 0: the array itself delivers A AND B and A NOR B. A NOR of those
// two sense-amplifier outputs gives A XOR B, which together with the carry latch
// C forms a full adder. A write-back multiplexer picks AND, OR, XOR, SUM, A,
// C or the tag T (optionally inverted) for column RD. The tag latch T enables
// conditional execution: with the instruction's conditional bit set, only rows
// holding T=1 write back. The AND/NOR bit-line scheme, carry and tag latches and
// the multiplexer inputs follow the published peripheral; the inverted outputs
// (NAND/NOR/XNOR/INV) are produced by inverting the selected bit.
//
// Timing: a, b and ctl are valid during the cycle in which exec is high;
// wdata/wen are combinational and are written by the array at the rising edge,
// where the C and T latches also update. C and T reset to 0.
module cram_compute_periph
  import cram_pkg::*;
#(
  parameter int unsigned ROWS = 256
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            exec,
  input  cram_ctl_t       ctl,
  input  logic [ROWS-1:0] a,
  input  logic [ROWS-1:0] b,
  output logic [ROWS-1:0] wdata,
  output logic [ROWS-1:0] wen,
  output logic [ROWS-1:0] c_q,
  output logic [ROWS-1:0] t_q
);

  logic [ROWS-1:0] cbl, cblb, x, sum, cout, sel, c_d, t_d, eq;

  always_comb begin
    cbl  = a & b;              // bit-line AND
    cblb = ~a & ~b;            // bit-line NOR (CBLB)
    x    = ~(cbl | cblb);      // near-memory NOR gate -> A XOR B
    sum  = x ^ c_q;
    cout = cbl | (x & c_q);
    eq   = ~(a ^ {ROWS{ctl.pattern}});
    unique case (ctl.wb_sel)
      WB_AND:   sel = cbl;
      WB_OR:    sel = ~cblb;
      WB_XOR:   sel = x;
      WB_SUM:   sel = sum;
      WB_A:     sel = a;
      WB_CARRY: sel = c_q;
      WB_TAG:   sel = t_q;
      default:  sel = a;
    endcase
    wdata = ctl.wb_inv ? ~sel : sel;
    wen   = (exec && ctl.wb_en) ? (ctl.cond ? t_q : '1) : '0;

    unique case (ctl.c_sel)
      C_COUT:  c_d = cout;
      C_SET:   c_d = '1;
      C_CLR:   c_d = '0;
      default: c_d = c_q;
    endcase
    unique case (ctl.t_sel)
      T_EQ:    t_d = ctl.cond ? (t_q & eq) : eq;
      T_A:     t_d = ctl.cond ? (t_q & a)  : a;
      T_C:     t_d = c_q;
      default: t_d = t_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q <= '0;
      t_q <= '0;
    end else if (exec) begin
      c_q <= c_d;
      t_q <= t_d;
    end
  end

endmodule
