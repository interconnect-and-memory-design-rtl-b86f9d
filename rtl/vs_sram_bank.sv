// vs_sram_bank: one bank of the ultra-low-leakage, voltage-stacked SRAM.
//
// Four arrays of ROWS x WIDTH bits share unstacked peripherals. Each array
// sits in the top or the bottom half of a stacked supply (see vs_swap_ctrl);
// placing most arrays in the top domain minimises leakage, and the controller
// keeps at least one in the bottom domain. addr = {array, row}. Only bottom
// arrays are accessed: a request to a top array waits one cycle while it is
// swapped with a bottom array, then proceeds. Interface: hold req (with we,
// addr, wdata) until gnt; a write is done at that edge, a read returns rdata
// with rvalid one cycle later. periph_on is high only in the cycle of an
// access, since the peripherals are power-gated right after each access.
// Four arrays per bank, the 128-bit word and the swap-before-access rule follow
// the published design; ROWS is this design's assumption.
module vs_sram_bank #(
  parameter int unsigned ROWS  = 256,
  parameter int unsigned WIDTH = 128,
  localparam int unsigned RW   = $clog2(ROWS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_we,
  input  logic [3:0]      cfg_top,
  input  logic            req,
  input  logic            we,
  input  logic [RW+1:0]   addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata,
  output logic            gnt,
  output logic            rvalid,
  output logic            periph_on,
  output logic [3:0]      top,
  output logic [3:0]      expand,
  output logic            swapping
);

  logic [WIDTH-1:0] mem [4*ROWS];
  logic [1:0]       arr;

  assign arr = addr[RW +: 2];

  vs_swap_ctrl #(.NARR(4)) u_swap (
    .clk, .rst_n, .cfg_we, .cfg_top, .req, .arr, .go (gnt), .top, .expand, .swapping
  );

  assign periph_on = gnt;

  always_ff @(posedge clk) begin
    if (gnt && we)  mem[addr] <= wdata;
    if (gnt && !we) rdata <= mem[addr];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= gnt && !we;

  // only bottom-domain arrays are ever accessed
  assert property (@(posedge clk) disable iff (!rst_n) gnt |-> !top[arr]);

endmodule
