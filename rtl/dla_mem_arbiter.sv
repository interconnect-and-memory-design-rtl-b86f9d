// dla_mem_arbiter: memory address mapping and arbitration between the four
// DLA processing elements (PEs) and their four memory sectors.
//
// Each PE issues 15-bit word addresses: bits [14:13] name the sector (the
// NUMA memory around PE 0..3), bits [12:0] the word inside it. Most traffic
// stays in a PE's own sector, but any PE may reach any sector. When several
// PEs address one sector in the same cycle, the sector's own PE wins, then the
// others in increasing index; losers see pe_gnt low and retry. A request is
// complete when the winner's sector also grants it (sec_gnt, low while a
// drowsy bank wakes). Read data returns to the PE two cycles after its grant,
// flagged by pe_rvalid. The offline schedule is meant to keep collisions
// rare. Address mapping and prioritized arbitration follow the published PE;
// the priority order is this design's own.
module dla_mem_arbiter #(
  parameter int unsigned NPE = 4,
  localparam int unsigned SW = $clog2(NPE)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // PE side
  input  logic [NPE-1:0]       pe_req,
  input  logic [NPE-1:0]       pe_we,
  input  logic [NPE-1:0]       pe_seq,
  input  logic [NPE-1:0][14:0] pe_addr,
  input  logic [NPE-1:0][95:0] pe_wdata,
  output logic [NPE-1:0]       pe_gnt,
  output logic [NPE-1:0]       pe_rvalid,
  output logic [NPE-1:0][95:0] pe_rdata,
  // sector side
  output logic [NPE-1:0]       sec_req,
  output logic [NPE-1:0]       sec_we,
  output logic [NPE-1:0]       sec_seq,
  output logic [NPE-1:0][12:0] sec_addr,
  output logic [NPE-1:0][95:0] sec_wdata,
  input  logic [NPE-1:0]       sec_gnt,
  input  logic [NPE-1:0][95:0] sec_rdata
);

  logic [NPE-1:0][SW-1:0] win;      // winning PE per sector
  logic [NPE-1:0][SW-1:0] tgt;      // sector per PE
  logic [NPE-1:0]         rd1, rd2;
  logic [NPE-1:0][SW-1:0] s1, s2;

  always_comb begin
    for (int p = 0; p < NPE; p++) tgt[p] = pe_addr[p][14:13];
    for (int s = 0; s < NPE; s++) begin
      sec_req[s] = 1'b0;
      win[s]     = SW'(s);
      for (int p = NPE - 1; p >= 0; p--)
        if (pe_req[p] && tgt[p] == SW'(s)) begin
          sec_req[s] = 1'b1;
          win[s]     = SW'(p);
        end
      if (pe_req[s] && tgt[s] == SW'(s)) win[s] = SW'(s);
      sec_we[s]    = pe_we[win[s]];
      sec_seq[s]   = pe_seq[win[s]];
      sec_addr[s]  = pe_addr[win[s]][12:0];
      sec_wdata[s] = pe_wdata[win[s]];
    end
    for (int p = 0; p < NPE; p++)
      pe_gnt[p] = pe_req[p] && win[tgt[p]] == SW'(p) && sec_gnt[tgt[p]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd1 <= '0;
      rd2 <= '0;
    end else begin
      rd1 <= pe_gnt & ~pe_we;
      rd2 <= rd1;
    end
  end

  always_ff @(posedge clk) begin
    s1 <= tgt;
    s2 <= s1;
  end

  always_comb
    for (int p = 0; p < NPE; p++) begin
      pe_rvalid[p] = rd2[p];
      pe_rdata[p]  = sec_rdata[s2[p]];
    end

endmodule
