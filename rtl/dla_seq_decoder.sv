// dla_seq_decoder: shift-register based sequential word-line decoder with
// SR-latch clock gating.
//
// Neural-network weight and input streams are read mostly at consecutive
// addresses. Instead of decoding a full address each time, a random access
// (load) decodes addr once into a one-hot register that drives the word-lines;
// every sequential access (seq) then only shifts the one-hot token up by one
// row, so the long address bus does not toggle. The ROWS shift-register bits
// are split into clock groups of GROUP bits. Each group has an SR latch: it is
// set when the token is in the group or in the last bit of the group below
// (about to enter), and reset once the token has moved on. Only groups whose
// latch is set are clocked (here: update), so at most two groups see the clock.
// A sequential step from the last row wraps to row 0 and raises wrap. The
// shift-register/SR-latch scheme and group size follow the published decoder;
// modelling the gated clock as a per-group enable is this design's own.
// Timing: wl and grp_en change at the rising edge after load or seq.
module dla_seq_decoder #(
  parameter int unsigned ROWS  = 256,
  parameter int unsigned GROUP = 16,
  localparam int unsigned NG   = ROWS / GROUP
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [$clog2(ROWS)-1:0] addr,
  input  logic                    seq,
  output logic [ROWS-1:0]         wl,
  output logic [NG-1:0]           grp_en,
  output logic                    wrap
);

  logic [ROWS-1:0] dec, rot, nxt;
  logic [NG-1:0]   grp_d, tok_g;

  assign wrap = seq && !load && wl[ROWS-1];

  always_comb begin
    dec       = '0;
    dec[addr] = 1'b1;
    rot       = {wl[ROWS-2:0], wl[ROWS-1]};
    nxt       = load ? dec : rot;
    for (int g = 0; g < NG; g++)
    begin
      tok_g[g] = |nxt[g*GROUP +: GROUP];
      grp_d[g] = tok_g[g] | nxt[(g*GROUP + ROWS - 1) % ROWS];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wl     <= ROWS'(1);
      grp_en <= NG'(1) | NG'(1) << (NG - 1);
    end else if (load || seq) begin
      for (int g = 0; g < NG; g++)
        if (load || grp_en[g]) wl[g*GROUP +: GROUP] <= nxt[g*GROUP +: GROUP];
      grp_en <= grp_d;
    end
  end

  // the token never enters a group whose clock is gated off
  assert property (@(posedge clk) disable iff (!rst_n)
                   (seq && !load) |-> (tok_g & ~grp_en) == '0);

endmodule
