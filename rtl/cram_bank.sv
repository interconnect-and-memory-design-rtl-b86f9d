// cram_bank: one 16-KB Compute SRAM bank.
//
// Four ROWS x COLS arrays (0 = top-left, 1 = top-right, 2 = bottom-left,
// 3 = bottom-right) sit around shared compute peripherals and one central
// instruction decoder. The bank works in two ways:
//  * as ordinary memory: mem_addr = {array[1:0], row, word}, 32-bit words,
//    read data one cycle after the request;
//  * as a bit-serial SIMD engine: each valid instruction is executed in one
//    cycle by all 2*ROWS compute rows of the selected array pair (top and
//    bottom array of the left or right side, chosen by enable bit 29), reading
//    bit columns RA and RB and writing bit column RD in every enabled row.
// An instruction takes priority over a memory access in the same cycle;
// mem_gnt tells the requester whether its access was taken. The array
// arrangement and 256 compute rows follow the published bank; the array-pair
// selection bit and the priority rule are this design's choices.
module cram_bank
  import cram_pkg::*;
#(
  parameter int unsigned ROWS = 128,
  parameter int unsigned COLS = 256,
  localparam int unsigned WORD = 32,
  localparam int unsigned RA_W = $clog2(ROWS),
  localparam int unsigned WS_W = $clog2(COLS/WORD),
  localparam int unsigned AW   = 2 + RA_W + WS_W
) (
  input  logic          clk,
  input  logic          rst_n,
  // conventional memory port
  input  logic          mem_req,
  input  logic          mem_we,
  input  logic [AW-1:0] mem_addr,
  input  logic [31:0]   mem_wdata,
  output logic [31:0]   mem_rdata,
  output logic          mem_gnt,
  // CRAM instruction port
  input  logic          instr_valid,
  input  logic [31:0]   instr
);

  logic            exec, side;
  cram_ctl_t       ctl;
  logic [7:0]      ra, rb, rd;
  logic [1:0]      m_arr;
  logic [1:0]      rsel_q;
  logic [2*ROWS-1:0] a, b, wdata, wen, c_q, t_q;
  logic [ROWS-1:0] col_a [4];
  logic [ROWS-1:0] col_b [4];
  logic [31:0]     rdata [4];

  cram_ctrl u_ctrl (
    .instr, .instr_valid, .exec, .ctl, .side, .ra, .rb, .rd
  );

  assign mem_gnt = mem_req && !instr_valid;
  assign m_arr   = mem_addr[AW-1 -: 2];

  // Rows 0..ROWS-1 come from the top array, ROWS..2*ROWS-1 from the bottom one.
  assign a = side ? {col_a[3], col_a[1]} : {col_a[2], col_a[0]};
  assign b = side ? {col_b[3], col_b[1]} : {col_b[2], col_b[0]};

  cram_compute_periph #(.ROWS(2*ROWS)) u_periph (
    .clk, .rst_n, .exec, .ctl, .a, .b, .wdata, .wen, .c_q, .t_q
  );

  for (genvar k = 0; k < 4; k++) begin : g_arr
    localparam bit RIGHT  = (k % 2) == 1;
    localparam bit BOTTOM = k >= 2;
    logic on_side;
    assign on_side = exec && (side == RIGHT);
    cram_array #(.ROWS(ROWS), .COLS(COLS), .WORD(WORD)) u_arr (
      .clk,
      .row_en    (mem_gnt && m_arr == 2'(k)),
      .row_we    (mem_we),
      .row_addr  (mem_addr[WS_W +: RA_W]),
      .word_sel  (mem_addr[WS_W-1:0]),
      .row_wdata (mem_wdata),
      .row_rdata (rdata[k]),
      .col_ra    (ra[$clog2(COLS)-1:0]),
      .col_rb    (rb[$clog2(COLS)-1:0]),
      .col_a     (col_a[k]),
      .col_b     (col_b[k]),
      .col_rd    (rd[$clog2(COLS)-1:0]),
      .col_we    (on_side ? wen[BOTTOM*ROWS +: ROWS] : '0),
      .col_wdata (wdata[BOTTOM*ROWS +: ROWS])
    );
  end

  always_ff @(posedge clk)
    if (mem_gnt && !mem_we) rsel_q <= m_arr;

  assign mem_rdata = rdata[rsel_q];

endmodule
