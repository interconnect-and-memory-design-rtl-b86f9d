// dla_packer: programmable ping-pong buffer that packs outgoing elements of
// the selected precision into 96-bit memory words.
//
// Elements arrive one per cycle (valid/ready); the low p bits of element k of
// a word go to bits [k*p +: p], element 0 lowest, the same order dla_unpacker
// uses. When 96/p elements are collected the word is handed to the second
// buffer of the ping-pong pair and offered on out_word (valid/ready) while the
// next word is filled. flush closes a partly filled word, zero-padded, so the
// tail of a vector can be stored. The 96-bit word and precision set follow the
// published buffer; flush and padding are this design's own.
module dla_packer
  import dla_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  prec_e       prec,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_elem,
  input  logic        flush,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [95:0] out_word
);

  logic [95:0] acc_q, acc_d, ins;
  logic [4:0]  idx_q;
  logic [95:0] out_q;
  logic        out_full_q;
  logic        take, close;
  logic [31:0] masked;

  assign in_ready  = !(out_full_q && idx_q == prec_count(prec) - 1'b1);
  assign take      = in_valid && in_ready;
  assign masked    = in_elem & ((32'd1 << prec_bits(prec)) - 1);
  assign ins       = 96'(masked) << (7'(idx_q) * 7'(prec_bits(prec)));
  assign acc_d     = take ? (acc_q | ins) : acc_q;
  assign close     = (take && idx_q == prec_count(prec) - 1'b1) ||
                     (flush && !take && idx_q != 0 && (!out_full_q || out_ready));
  assign out_valid = out_full_q;
  assign out_word  = out_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q      <= '0;
      idx_q      <= '0;
      out_q      <= '0;
      out_full_q <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_full_q <= 1'b0;
      if (close) begin
        out_q      <= acc_d;
        out_full_q <= 1'b1;
        acc_q      <= '0;
        idx_q      <= '0;
      end else if (take) begin
        acc_q <= acc_d;
        idx_q <= idx_q + 1'b1;
      end
    end
  end

  // a closing word never overwrites one that is still waiting
  assert property (@(posedge clk) disable iff (!rst_n) close |-> (!out_full_q || out_ready));

endmodule
