// dla_drowsy_ctrl: bank-by-bank drowsy-mode control for one PE's memory.
//
// Because a DNN's memory accesses are scheduled ahead of time, most banks sit
// idle most of the time. The PE writes a schedule mask (sched_we/sched_mask)
// naming the banks to put into drowsy mode: their peripherals are cut off by
// the PMOS header (pg_en) and their array supply is clamped by the NMOS
// source follower (clamp_en) so data is retained. If a request still arrives
// for a drowsy bank (need), the bank is woken: wake pulses, the drowsy bit
// clears at the next edge, and the request can be served one cycle later
// (ready). A schedule write and a wake in the same cycle: the wake wins for that
// bank. Per-bank drowsy control by the PE follows the published design; the
// wake-on-demand rule and its one-cycle delay are this design's own.
module dla_drowsy_ctrl #(
  parameter int unsigned NBANKS = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sched_we,
  input  logic [NBANKS-1:0] sched_mask,
  input  logic [NBANKS-1:0] need,
  output logic [NBANKS-1:0] drowsy,
  output logic [NBANKS-1:0] ready,
  output logic [NBANKS-1:0] wake,
  output logic [NBANKS-1:0] pg_en,
  output logic [NBANKS-1:0] clamp_en
);

  assign wake     = need & drowsy;
  assign ready    = ~drowsy;
  assign pg_en    = drowsy;
  assign clamp_en = drowsy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        drowsy <= '0;
    else if (sched_we) drowsy <= sched_mask & ~need;
    else               drowsy <= drowsy & ~need;
  end

endmodule
