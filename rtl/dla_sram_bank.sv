// dla_sram_bank: one bank of the DLA's custom low-power 8T SRAM.
//
// A bank is a quad-array: four sub-arrays of WORDS/4 rows share one address
// decoder and read-out, which halves the bit-line length compared with two
// sub-arrays. Words are 96 bits (no column mux). The row decoder is the
// sequential decoder (dla_seq_decoder): a random access (en, !seq) decodes
// addr = {sub-array, row}; a sequential access (en, seq) ignores addr and
// moves to the next word, stepping to the next sub-array when the row wraps.
// Timing: the request is decoded at the first rising edge and the array is
// accessed at the second, so read data appears on rdata two cycles after the
// request; a write is likewise committed one cycle later. While drowsy is high
// the peripherals are power-gated and the array is clamped for retention: the
// contents are kept and no access is allowed (assertion). Bank structure and
// access modes follow the published SRAM; the pipeline is this design's own.
module dla_sram_bank #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned WIDTH = 96,
  localparam int unsigned ROWS  = WORDS / 4,
  localparam int unsigned RW    = $clog2(ROWS),
  localparam int unsigned GROUP = ROWS < 16 ? ROWS : 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     we,
  input  logic                     seq,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata,
  input  logic                     drowsy
);

  logic [WIDTH-1:0] mem [WORDS];
  logic [ROWS-1:0]  wl;
  logic [ROWS/GROUP-1:0] grp_en;
  logic             wrap;
  logic [1:0]       sub_q;
  logic             en_q, we_q;
  logic [WIDTH-1:0] wdata_q;
  logic [RW-1:0]    row;

  dla_seq_decoder #(.ROWS(ROWS), .GROUP(GROUP)) u_dec (
    .clk, .rst_n,
    .load (en && !seq),
    .addr (addr[RW-1:0]),
    .seq  (en && seq),
    .wl, .grp_en, .wrap
  );

  always_comb begin
    row = '0;
    for (int r = 0; r < ROWS; r++)
      if (wl[r]) row |= RW'(r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q  <= 1'b0;
      we_q  <= 1'b0;
      sub_q <= '0;
    end else begin
      en_q <= en;
      we_q <= we;
      if (en && !seq)    sub_q <= addr[RW +: 2];
      else if (en && wrap) sub_q <= sub_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (en) wdata_q <= wdata;
    if (en_q && we_q)  mem[{sub_q, row}] <= wdata_q;
    if (en_q && !we_q) rdata <= mem[{sub_q, row}];
  end

  assert property (@(posedge clk) disable iff (!rst_n) drowsy |-> !en && !en_q);

endmodule
