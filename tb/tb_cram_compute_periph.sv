// tb_cram_compute_periph: drives the per-row peripherals with random bit
// columns and checks every opcode's write-back bit, write enable and carry/tag
// update against a row-by-row reference model, with and without conditional
// execution. The controls come from cram_ctrl, the decoder that feeds the
// peripherals in the bank.
`timescale 1ns/1ps
module tb_cram_compute_periph;
  import cram_pkg::*;
  localparam int R = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] instr = 0;
  logic        instr_valid = 0, exec, side;
  cram_ctl_t   ctl;
  logic [7:0]  ra, rb, rd;
  logic [R-1:0] a, b, wdata, wen, c_q, t_q;

  cram_ctrl u_ctrl (.instr, .instr_valid, .exec, .ctl, .side, .ra, .rb, .rd);
  cram_compute_periph #(.ROWS(R)) dut (.clk, .rst_n, .exec, .ctl, .a, .b, .wdata, .wen, .c_q, .t_q);

  int checks = 0, failures = 0;
  logic [R-1:0] mc, mt;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    mc = '0; mt = '0;
    for (int it = 0; it < 2000; it++) begin
      cram_op_e op;
      logic cond, pat;
      logic [R-1:0] ew, ee, nc, nt;
      op   = cram_op_e'($urandom % 16);
      cond = 1'($urandom);
      pat  = 1'($urandom);
      for (int k = 0; k < R / 32; k++) begin a[k*32 +: 32] = $urandom; b[k*32 +: 32] = $urandom; end
      instr = mk_instr(op, 8'd1, {7'd0, pat}, 8'd2, cond);
      instr_valid = 1;
      for (int r = 0; r < R; r++) begin
        logic s, w, x;
        x = a[r] ^ b[r];
        s = x ^ mc[r];
        nc[r] = mc[r]; nt[r] = mt[r]; w = 1'b1; ew[r] = 1'b0;
        case (op)
          OP_AND: ew[r] = a[r] & b[r];   OP_OR: ew[r] = a[r] | b[r];
          OP_NAND: ew[r] = ~(a[r] & b[r]); OP_NOR: ew[r] = ~(a[r] | b[r]);
          OP_XOR: ew[r] = x;             OP_XNOR: ew[r] = ~x;
          OP_ADD: begin ew[r] = s; nc[r] = (a[r] & b[r]) | (x & mc[r]); end
          OP_COPY: ew[r] = a[r];         OP_INV: ew[r] = ~a[r];
          OP_EQUAL: begin w = 0; nt[r] = cond ? mt[r] & (a[r] == pat) : (a[r] == pat); end
          OP_LOAD_T: begin w = 0; nt[r] = cond ? mt[r] & a[r] : a[r]; end
          OP_STORE_C: ew[r] = mc[r];     OP_STORE_T: ew[r] = mt[r];
          OP_SET_C: begin w = 0; nc[r] = 1; end
          OP_RESET_C: begin w = 0; nc[r] = 0; end
          default: begin w = 0; nt[r] = mc[r]; end   // C_TO_T
        endcase
        ee[r] = w & (cond ? mt[r] : 1'b1);
      end
      #1;
      checks++;
      if (wen !== ee || ((wdata ^ ew) & ee) != '0) begin
        failures++; if (failures < 8) $display("FAIL: op %s cond %0d write-back", op.name(), cond);
      end
      @(posedge clk); #1;
      instr_valid = 0;
      checks++;
      if (c_q !== nc || t_q !== nt) begin
        failures++; if (failures < 8) $display("FAIL: op %s cond %0d latches", op.name(), cond);
      end
      mc = nc; mt = nt;
    end
    // exec low: latches hold
    instr = mk_instr(OP_SET_C, 0, 0, 0); #1; @(posedge clk); #1;
    checks++; if (c_q !== mc || wen != '0) begin failures++; $display("FAIL: idle cycle changed state"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
