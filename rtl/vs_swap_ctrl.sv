// vs_swap_ctrl: array-swap controller of one voltage-stacked SRAM bank.
//
// The bank's NARR arrays are each connected, by power switches, either to the
// top voltage domain (mid-rail to VDD) or to the bottom one (ground to
// mid-rail); the two domains are in series, so the arrays share one supply
// current and retain data at about half the supply without a regulator. Only
// bottom arrays are read or written, because they share the ground reference
// of the unstacked peripherals. top[] holds each array's domain (the real
// design keeps it in always-on latches). cfg_we loads a new arrangement; at
// least one array must stay in the bottom domain (assertion).
// A request (req, arr) to a bottom array is allowed at once (go). A request to
// a top array first swaps it with a bottom array of the same bank - the
// lowest-numbered one - so the number of top arrays, and with it the current
// balance, is unchanged. The swap occupies one clock cycle (swapping): both
// arrays are expanded to the full rail (expand), and at the end of the cycle
// they are collapsed into their new domains; go rises in the next cycle while
// the requester holds its request. The swap rule follows the published
// design; choosing the partner and the one-cycle stall are this design's own,
// and the sequencing of small and large power-switch headers inside the swap
// cycle is left to the analog switch circuit.
module vs_swap_ctrl #(
  parameter int unsigned NARR = 4,
  localparam int unsigned AW  = $clog2(NARR)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_we,
  input  logic [NARR-1:0] cfg_top,
  input  logic            req,
  input  logic [AW-1:0]   arr,
  output logic            go,
  output logic [NARR-1:0] top,
  output logic [NARR-1:0] expand,
  output logic            swapping
);

  logic [AW-1:0] partner;
  logic          found;

  always_comb begin
    partner = '0;
    found   = 1'b0;
    for (int k = NARR - 1; k >= 0; k--)
      if (!top[k]) begin
        partner = AW'(k);
        found   = 1'b1;
      end
  end

  assign go       = req && !top[arr];
  assign swapping = req && top[arr] && found;
  assign expand   = swapping ? (NARR'(1) << arr) | (NARR'(1) << partner) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top <= '0;
    end else if (swapping) begin
      top[arr]     <= 1'b0;
      top[partner] <= 1'b1;
    end else if (cfg_we) begin
      top <= cfg_top;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> !(&cfg_top));
  assert property (@(posedge clk) disable iff (!rst_n) !(&top));

endmodule
