// dla_unpacker: programmable ping-pong buffer that unpacks 96-bit memory words
// into elements of the selected precision for the PE datapath.
//
// Two 96-bit word registers form a ping-pong pair: while the element stream is
// taken from one, the next word from memory can already be written into the
// other, so a word boundary costs no bubble. Element k of a word is bits
// [k*p +: p] (p = precision, element 0 in the least significant bits) and
// leaves sign-extended to 32 bits, one element per cycle, with out_last on the
// word's final element (16, 12, 8, 6, 4 or 3 elements per word). prec must stay
// constant while words are in flight. Handshakes are valid/ready on both sides.
// The 96-bit word and the precision set follow the published buffer; element
// order, sign extension and one-element-per-cycle rate are this design's own.
module dla_unpacker
  import dla_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  prec_e       prec,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [95:0] in_word,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_elem,
  output logic        out_last
);

  logic [95:0] buf_q [2];
  logic [1:0]  full_q;
  logic        rd_q, wr_q;   // buffer being unpacked / to be written next
  logic [4:0]  idx_q;
  logic [95:0] shifted;
  logic [4:0]  cnt;
  logic        pop, push;

  assign cnt      = prec_count(prec);
  assign in_ready = !full_q[wr_q];
  assign push     = in_valid && in_ready;
  assign out_valid = full_q[rd_q];
  assign out_last  = idx_q == cnt - 1'b1;
  assign pop       = out_valid && out_ready && out_last;
  assign shifted   = buf_q[rd_q] >> (7'(idx_q) * 7'(prec_bits(prec)));

  always_comb begin
    case (prec)
      PREC_6:  out_elem = {{26{shifted[5]}},  shifted[5:0]};
      PREC_8:  out_elem = {{24{shifted[7]}},  shifted[7:0]};
      PREC_12: out_elem = {{20{shifted[11]}}, shifted[11:0]};
      PREC_16: out_elem = {{16{shifted[15]}}, shifted[15:0]};
      PREC_24: out_elem = {{8{shifted[23]}},  shifted[23:0]};
      default: out_elem = shifted[31:0];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q <= '0;
      rd_q   <= 1'b0;
      wr_q   <= 1'b0;
      idx_q  <= '0;
    end else begin
      if (push) begin
        full_q[wr_q] <= 1'b1;
        wr_q         <= !wr_q;
      end
      if (out_valid && out_ready) begin
        if (out_last) begin
          idx_q        <= '0;
          full_q[rd_q] <= 1'b0;
          rd_q         <= !rd_q;
        end else begin
          idx_q <= idx_q + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (push) buf_q[wr_q] <= in_word;

  // push and pop never touch the same buffer in one cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(push && pop && wr_q == rd_q));

endmodule
