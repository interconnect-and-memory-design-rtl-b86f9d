// cram_array: one ROWS x COLS array of 8T transposable SRAM cells.
//
// The transposable cell can be reached from two directions, and so can this
// array. Conventionally, a horizontal word-line selects a row and a column mux
// picks one WORD-bit word of it (read with one cycle latency, or written).
// For in-memory computing, vertical compute word-lines select whole bit
// columns: col_a / col_b return bit RA / RB of every row combinationally, and
// at the rising edge bit RD of each row whose col_we is set is overwritten with
// col_wdata. Word w of a row occupies columns WORD*w .. WORD*w+WORD-1, so bit i
// of the element stored in word slot w is compute word-line WORD*w+i.
// The two-direction access follows the published cell; the word layout and the
// read latency are this design's choice. The cell is not modelled electrically.
module cram_array #(
  parameter int unsigned ROWS = 128,
  parameter int unsigned COLS = 256,
  parameter int unsigned WORD = 32
) (
  input  logic                        clk,
  // conventional port
  input  logic                        row_en,
  input  logic                        row_we,
  input  logic [$clog2(ROWS)-1:0]     row_addr,
  input  logic [$clog2(COLS/WORD)-1:0] word_sel,
  input  logic [WORD-1:0]             row_wdata,
  output logic [WORD-1:0]             row_rdata,
  // compute port
  input  logic [$clog2(COLS)-1:0]     col_ra,
  input  logic [$clog2(COLS)-1:0]     col_rb,
  output logic [ROWS-1:0]             col_a,
  output logic [ROWS-1:0]             col_b,
  input  logic [$clog2(COLS)-1:0]     col_rd,
  input  logic [ROWS-1:0]             col_we,
  input  logic [ROWS-1:0]             col_wdata
);

  // One register per row, so that both write directions can update any row
  // in the same clock; writes are expressed as bit masks.
  logic [COLS-1:0] mem [ROWS];
  logic [COLS-1:0] rd_onehot, word_mask, word_data;

  always_comb begin
    rd_onehot = '0;
    rd_onehot[col_rd] = 1'b1;
    word_mask = '0;
    word_mask[word_sel*WORD +: WORD] = '1;
    word_data = {(COLS/WORD){row_wdata}};
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [COLS-1:0] q;
    always_ff @(posedge clk) begin
      if (col_we[r])
        q <= (q & ~rd_onehot) | (rd_onehot & {COLS{col_wdata[r]}});
      else if (row_en && row_we && row_addr == r)
        q <= (q & ~word_mask) | (word_data & word_mask);
    end
    assign mem[r]   = q;
    assign col_a[r] = q[col_ra];
    assign col_b[r] = q[col_rb];
  end

  always_ff @(posedge clk)
    if (row_en && !row_we) row_rdata <= mem[row_addr][word_sel*WORD +: WORD];

  // The bank never drives both ports in one cycle.
  assert property (@(posedge clk) !(row_en && row_we && |col_we));

endmodule
