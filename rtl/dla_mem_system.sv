// dla_mem_system: the 270 kB on-chip weight/data memory of the deep-learning
// accelerator with its four PE ports.
//
// Instead of one large memory and one large PE, the accelerator uses four PEs,
// each placed in the middle of its own 67.5 kB NUMA sector (dla_numa_mem), so
// most data travels only a short distance. All weights of the target networks
// stay on chip; there is no DRAM. The address mapping / arbitration unit
// (dla_mem_arbiter) lets each PE reach every sector with a 15-bit word address
// {sector, word}. Each PE also owns the drowsy schedule of its sector
// (sched_we/sched_mask). Port timing is that of dla_mem_arbiter: pe_gnt in
// the request cycle, pe_rvalid/pe_rdata two cycles after a granted read. The
// PEs themselves are not part of this block. Structure follows the published
// accelerator; interface details are this design's own.
module dla_mem_system #(
  parameter int unsigned NPE = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NPE-1:0]       pe_req,
  input  logic [NPE-1:0]       pe_we,
  input  logic [NPE-1:0]       pe_seq,
  input  logic [NPE-1:0][14:0] pe_addr,
  input  logic [NPE-1:0][95:0] pe_wdata,
  output logic [NPE-1:0]       pe_gnt,
  output logic [NPE-1:0]       pe_rvalid,
  output logic [NPE-1:0][95:0] pe_rdata,
  input  logic [NPE-1:0]       sched_we,
  input  logic [NPE-1:0][15:0] sched_mask,
  output logic [NPE-1:0][15:0] drowsy,
  output logic [NPE-1:0][15:0] wake
);

  logic [NPE-1:0]       sec_req, sec_we, sec_seq, sec_gnt;
  logic [NPE-1:0][12:0] sec_addr;
  logic [NPE-1:0][95:0] sec_wdata, sec_rdata;

  dla_mem_arbiter #(.NPE(NPE)) u_arb (
    .clk, .rst_n, .pe_req, .pe_we, .pe_seq, .pe_addr, .pe_wdata, .pe_gnt, .pe_rvalid, .pe_rdata,
    .sec_req, .sec_we, .sec_seq, .sec_addr, .sec_wdata, .sec_gnt, .sec_rdata
  );

  for (genvar s = 0; s < NPE; s++) begin : g_sec
    logic [15:0] pg_en, clamp_en;
    dla_numa_mem u_mem (
      .clk, .rst_n,
      .req (sec_req[s]), .we (sec_we[s]), .seq (sec_seq[s]), .addr (sec_addr[s]),
      .wdata (sec_wdata[s]), .rdata (sec_rdata[s]), .gnt (sec_gnt[s]),
      .sched_we (sched_we[s]), .sched_mask (sched_mask[s]),
      .drowsy (drowsy[s]), .pg_en, .clamp_en, .wake (wake[s])
    );
  end

endmodule
