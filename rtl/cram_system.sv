// cram_system: the memory side of the CRAM IoT test chip.
//
// NBANKS 16-KB CRAM banks are shared by two masters: the CPU memory bus
// (cpu_*; the processor itself is outside this design) and the CRAM control
// bus. Any bank can serve as plain instruction/data memory for the CPU, hold a
// CRAM program, or compute. A typical configuration: banks 0 and 1 are the
// CPU's instruction and data memory, bank 2 holds a CRAM program, and banks 3-7
// compute; the control bus streams the program from bank 2 to banks 3-7 while
// the CPU keeps using banks 0 and 1.
//
// CPU port: cpu_addr = {bank, word-in-bank}, 32-bit words, cpu_gnt says the
// access was taken this cycle, read data appears on cpu_rdata one cycle after a
// granted read. A bank that is fetching for, or executing from, the control bus
// in a cycle does not grant the CPU. The control bus is programmed through the
// cb_* ports (see cram_ctrl_bus). Bank count and sharing follow the published
// test chip; the request/grant bus and the priority are this design's own.
module cram_system #(
  parameter int unsigned NBANKS = 8,
  parameter int unsigned ROWS   = 128,
  parameter int unsigned COLS   = 256,
  localparam int unsigned BW    = $clog2(NBANKS),
  localparam int unsigned LAW   = 2 + $clog2(ROWS) + $clog2(COLS/32)
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU memory bus
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic [BW+LAW-1:0] cpu_addr,
  input  logic [31:0]       cpu_wdata,
  output logic [31:0]       cpu_rdata,
  output logic              cpu_gnt,
  // control bus programming
  input  logic              cb_start,
  input  logic [BW-1:0]     cb_src_bank,
  input  logic [LAW-1:0]    cb_src_addr,
  input  logic [15:0]       cb_count,
  input  logic [NBANKS-1:0] cb_bank_mask,
  output logic              cb_busy,
  output logic              cb_done
);

  logic              rd_req;
  logic [BW-1:0]     rd_bank, cpu_bank, cpu_bank_q;
  logic [LAW-1:0]    rd_addr;
  logic [NBANKS-1:0] bc_valid;
  logic [31:0]       bc_instr;
  logic [31:0]       b_rdata [NBANKS];
  logic [NBANKS-1:0] b_gnt;

  assign cpu_bank = cpu_addr[LAW +: BW];

  cram_ctrl_bus #(.NBANKS(NBANKS), .AW(LAW)) u_cbus (
    .clk, .rst_n,
    .start(cb_start), .src_bank(cb_src_bank), .src_addr(cb_src_addr), .count(cb_count),
    .bank_mask(cb_bank_mask), .busy(cb_busy), .done(cb_done),
    .rd_req, .rd_bank, .rd_addr, .rd_data(b_rdata[rd_bank]),
    .bc_valid, .bc_instr
  );

  for (genvar k = 0; k < NBANKS; k++) begin : g_bank
    logic cb_here, cpu_here;
    assign cb_here  = rd_req && rd_bank == BW'(k);
    assign cpu_here = cpu_req && cpu_bank == BW'(k) && !cb_here;
    cram_bank #(.ROWS(ROWS), .COLS(COLS)) u_bank (
      .clk, .rst_n,
      .mem_req     (cb_here || cpu_here),
      .mem_we      (cb_here ? 1'b0 : cpu_we),
      .mem_addr    (cb_here ? rd_addr : cpu_addr[LAW-1:0]),
      .mem_wdata   (cpu_wdata),
      .mem_rdata   (b_rdata[k]),
      .mem_gnt     (b_gnt[k]),
      .instr_valid (bc_valid[k]),
      .instr       (bc_instr)
    );
  end

  assign cpu_gnt = cpu_req && b_gnt[cpu_bank] && !(rd_req && rd_bank == cpu_bank);

  always_ff @(posedge clk)
    if (cpu_gnt && !cpu_we) cpu_bank_q <= cpu_bank;

  assign cpu_rdata = b_rdata[cpu_bank_q];

endmodule
