// dla_numa_mem: the non-uniform memory (NUMA) sector that surrounds one PE.
//
// 67.5 kB in four hierarchy levels of four banks each. Level 1 banks are the
// smallest (0.375 kB, lowest access energy) and sit closest to the PE; level 4
// banks are the largest (12 kB, densest) and farthest away. Frequently reused
// data such as the input vector is mapped to the lower levels, the large and
// rarely reused weight matrix to the upper ones; the mapping is fixed by the
// compiler, so no tags or cache control are needed. Word address map (96-bit
// words): L1 banks at 0-127 (4 x 32 words), L2 at 128-639 (4 x 128),
// L3 at 640-1663 (4 x 256), L4 at 1664-5759 (4 x 1024).
// Signal gating: the address/data/write signals of a level are forced low
// unless that level is addressed, so accesses to a low level do not toggle the
// wires of the levels above it. Each bank has bank-by-bank drowsy control
// (dla_drowsy_ctrl). gnt is high when the addressed bank is awake and the
// access is taken; a request to a drowsy bank wakes it and is granted one cycle
// later. Read data is valid on rdata two cycles after a granted read. Level
// count and bank sizes follow the published sector; the address map and the
// gating by forcing low are this design's own.
module dla_numa_mem #(
  parameter int unsigned L1_WORDS = 32,
  parameter int unsigned L2_WORDS = 128,
  parameter int unsigned L3_WORDS = 256,
  parameter int unsigned L4_WORDS = 1024,
  localparam int unsigned TOTAL   = 4 * (L1_WORDS + L2_WORDS + L3_WORDS + L4_WORDS),
  localparam int unsigned AW      = $clog2(TOTAL)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          we,
  input  logic          seq,
  input  logic [AW-1:0] addr,
  input  logic [95:0]   wdata,
  output logic [95:0]   rdata,
  output logic          gnt,
  input  logic          sched_we,
  input  logic [15:0]   sched_mask,
  output logic [15:0]   drowsy,
  output logic [15:0]   pg_en,
  output logic [15:0]   clamp_en,
  output logic [15:0]   wake
);

  localparam int unsigned LW   [4] = '{L1_WORDS, L2_WORDS, L3_WORDS, L4_WORDS};
  localparam int unsigned BASE [4] = '{0, 4*L1_WORDS, 4*(L1_WORDS+L2_WORDS),
                                       4*(L1_WORDS+L2_WORDS+L3_WORDS)};

  logic [1:0]   lvl, bnk;
  logic [AW-1:0] off;
  logic [15:0]  need, ready;
  logic [3:0]   b_sel;             // bank index {lvl, bnk}
  logic [3:0]   sel_q1, sel_q2;
  logic [95:0]  b_rdata [16];
  logic         acc;

  always_comb begin
    lvl = 2'd3;
    for (int l = 3; l >= 0; l--)
      if (addr < AW'(BASE[l] + 4*LW[l])) lvl = 2'(l);
    off = addr - AW'(BASE[lvl]);
    bnk = '0;
    for (int k = 0; k < 4; k++)
      if (off >= AW'(k * LW[lvl])) bnk = 2'(k);
    off   = off - AW'(bnk * LW[lvl]);
    b_sel = {lvl, bnk};
    need  = req ? (16'd1 << b_sel) : '0;
  end

  assign acc = req && ready[b_sel];
  assign gnt = acc;

  dla_drowsy_ctrl #(.NBANKS(16)) u_drowsy (
    .clk, .rst_n, .sched_we, .sched_mask, .need, .drowsy, .ready, .wake, .pg_en, .clamp_en
  );

  for (genvar l = 0; l < 4; l++) begin : g_lvl
    localparam int unsigned W  = LW[l];
    localparam int unsigned BW = $clog2(W);
    // level signal gating
    logic          l_on, l_we, l_seq;
    logic [BW-1:0] l_addr;
    logic [95:0]   l_wdata;
    assign l_on    = acc && lvl == 2'(l);
    assign l_we    = l_on & we;
    assign l_seq   = l_on & seq;
    assign l_addr  = l_on ? off[BW-1:0] : '0;
    assign l_wdata = l_on ? wdata : '0;
    for (genvar k = 0; k < 4; k++) begin : g_bank
      dla_sram_bank #(.WORDS(W), .WIDTH(96)) u_bank (
        .clk, .rst_n,
        .en     (l_on && bnk == 2'(k)),
        .we     (l_we),
        .seq    (l_seq),
        .addr   (l_addr),
        .wdata  (l_wdata),
        .rdata  (b_rdata[l*4+k]),
        .drowsy (drowsy[l*4+k])
      );
    end
  end

  always_ff @(posedge clk) begin
    sel_q1 <= b_sel;
    sel_q2 <= sel_q1;
  end
  assign rdata = b_rdata[sel_q2];

  // drowsy schedule must not put a bank to sleep while it finishes an access
  assert property (@(posedge clk) disable iff (!rst_n) acc |-> ##1 !drowsy[sel_q1]);

endmodule
