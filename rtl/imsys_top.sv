// imsys_top: the three memory-centric subsystems side by side.
//
//  * CRAM: a 128 kB compute SRAM (eight 16 kB banks) that works both as the
//    memory of a small IoT processor and as a bit-serial SIMD engine; ports
//    cram_cpu_* (the processor's memory bus) and cram_cb_* (control bus).
//  * DLA memory: the 270 kB, four-sector NUMA memory of a low-power deep-
//    learning accelerator with its four PE ports (dla_pe_*) and drowsy
//    schedules.
//  * VS SRAM: one bank of an ultra-low-leakage voltage-stacked SRAM with
//    array swapping (vs_*).
// The three are independent designs; they share only clock and reset here.
// Timing of each port group is that of the instantiated block.
module imsys_top (
  input  logic               clk,
  input  logic               rst_n,
  // CRAM system
  input  logic               cram_cpu_req,
  input  logic               cram_cpu_we,
  input  logic [14:0]        cram_cpu_addr,
  input  logic [31:0]        cram_cpu_wdata,
  output logic [31:0]        cram_cpu_rdata,
  output logic               cram_cpu_gnt,
  input  logic               cram_cb_start,
  input  logic [2:0]         cram_cb_src_bank,
  input  logic [11:0]        cram_cb_src_addr,
  input  logic [15:0]        cram_cb_count,
  input  logic [7:0]         cram_cb_bank_mask,
  output logic               cram_cb_busy,
  output logic               cram_cb_done,
  // DLA memory system
  input  logic [3:0]         dla_pe_req,
  input  logic [3:0]         dla_pe_we,
  input  logic [3:0]         dla_pe_seq,
  input  logic [3:0][14:0]   dla_pe_addr,
  input  logic [3:0][95:0]   dla_pe_wdata,
  output logic [3:0]         dla_pe_gnt,
  output logic [3:0]         dla_pe_rvalid,
  output logic [3:0][95:0]   dla_pe_rdata,
  input  logic [3:0]         dla_sched_we,
  input  logic [3:0][15:0]   dla_sched_mask,
  output logic [3:0][15:0]   dla_drowsy,
  output logic [3:0][15:0]   dla_wake,
  // voltage-stacked SRAM bank
  input  logic               vs_cfg_we,
  input  logic [3:0]         vs_cfg_top,
  input  logic               vs_req,
  input  logic               vs_we,
  input  logic [9:0]         vs_addr,
  input  logic [127:0]       vs_wdata,
  output logic [127:0]       vs_rdata,
  output logic               vs_gnt,
  output logic               vs_rvalid,
  output logic               vs_periph_on,
  output logic [3:0]         vs_top,
  output logic [3:0]         vs_expand,
  output logic               vs_swapping
);

  cram_system u_cram (
    .clk, .rst_n,
    .cpu_req (cram_cpu_req), .cpu_we (cram_cpu_we), .cpu_addr (cram_cpu_addr),
    .cpu_wdata (cram_cpu_wdata), .cpu_rdata (cram_cpu_rdata), .cpu_gnt (cram_cpu_gnt),
    .cb_start (cram_cb_start), .cb_src_bank (cram_cb_src_bank), .cb_src_addr (cram_cb_src_addr),
    .cb_count (cram_cb_count), .cb_bank_mask (cram_cb_bank_mask),
    .cb_busy (cram_cb_busy), .cb_done (cram_cb_done)
  );

  dla_mem_system u_dla (
    .clk, .rst_n,
    .pe_req (dla_pe_req), .pe_we (dla_pe_we), .pe_seq (dla_pe_seq), .pe_addr (dla_pe_addr),
    .pe_wdata (dla_pe_wdata), .pe_gnt (dla_pe_gnt), .pe_rvalid (dla_pe_rvalid), .pe_rdata (dla_pe_rdata),
    .sched_we (dla_sched_we), .sched_mask (dla_sched_mask), .drowsy (dla_drowsy), .wake (dla_wake)
  );

  vs_sram_bank u_vs (
    .clk, .rst_n,
    .cfg_we (vs_cfg_we), .cfg_top (vs_cfg_top), .req (vs_req), .we (vs_we), .addr (vs_addr),
    .wdata (vs_wdata), .rdata (vs_rdata), .gnt (vs_gnt), .rvalid (vs_rvalid),
    .periph_on (vs_periph_on), .top (vs_top), .expand (vs_expand), .swapping (vs_swapping)
  );

endmodule
