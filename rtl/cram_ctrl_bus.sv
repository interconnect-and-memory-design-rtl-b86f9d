// cram_ctrl_bus: the CRAM control bus.
//
// Complex operations are stored as sequences of 32-bit CRAM instructions in
// one memory bank. When started, this block reads `count` consecutive words
// from bank `src_bank`, beginning at word `src_addr`, and broadcasts each one
// to every bank set in `bank_mask`, so all compute banks execute the same
// program in lock step. Reads go through the normal memory port of the source
// bank (rd_req/rd_bank/rd_addr, data back one cycle later on rd_data); the word
// read in cycle t is broadcast in cycle t+1, giving one instruction per cycle
// after a single cycle of start-up. `done` pulses in the cycle after the last
// broadcast. Streaming from an instruction bank to the compute banks follows
// the published test chip; the start/count/mask interface is this design's own.
module cram_ctrl_bus #(
  parameter int unsigned NBANKS = 8,
  parameter int unsigned AW     = 12,
  localparam int unsigned BW    = $clog2(NBANKS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [BW-1:0]     src_bank,
  input  logic [AW-1:0]     src_addr,
  input  logic [15:0]       count,
  input  logic [NBANKS-1:0] bank_mask,
  output logic              busy,
  output logic              done,
  // instruction fetch
  output logic              rd_req,
  output logic [BW-1:0]     rd_bank,
  output logic [AW-1:0]     rd_addr,
  input  logic [31:0]       rd_data,
  // broadcast
  output logic [NBANKS-1:0] bc_valid,
  output logic [31:0]       bc_instr
);

  logic [15:0]       left_q;     // words still to fetch
  logic [AW-1:0]     addr_q;
  logic [NBANKS-1:0] mask_q;
  logic              fetched_q;  // a word was read last cycle

  assign rd_req  = busy && left_q != 0;
  assign rd_bank = src_bank;
  assign rd_addr = addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      left_q    <= '0;
      addr_q    <= '0;
      mask_q    <= '0;
      fetched_q <= 1'b0;
    end else begin
      done      <= 1'b0;
      fetched_q <= rd_req;
      if (start && !busy) begin
        busy   <= count != 0;
        done   <= count == 0;
        left_q <= count;
        addr_q <= src_addr;
        mask_q <= bank_mask;
      end else if (busy) begin
        if (rd_req) begin
          left_q <= left_q - 1'b1;
          addr_q <= addr_q + 1'b1;
        end
        if (left_q == 0 && fetched_q) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign bc_valid = fetched_q ? mask_q : '0;
  assign bc_instr = rd_data;

  // A source bank must not execute the instructions it is serving.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !mask_q[src_bank]);

endmodule
