// tb_cram_bank: self-checking test of one CRAM bank at full size (4 x 128x256).
//
// Loads two vectors of 256 random N-bit elements (one per compute row) through
// the conventional port, runs bit-serial programs built from the single-cycle
// primitives - N-bit add, subtract (invert + add with carry preset), shift-add
// multiply with the tag latch, XOR, and a multi-bit search - reads the results
// back through the conventional port and compares them with arithmetic done in
// the testbench. The number of instructions of each program is checked against
// the published cycle counts (add N+1, sub 2N+1, mult N^2+5N-2, XOR N, search N)
// and every instruction is issued in consecutive cycles, so the bank sustains
// one instruction per cycle. Layout: element of row r in word slot 0 (A),
// 1 (B), 2 (result), 3 (temporary).
`timescale 1ns/1ps
module tb_cram_bank;
  import cram_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        mem_req = 0, mem_we = 0, mem_gnt;
  logic [11:0] mem_addr = 0;
  logic [31:0] mem_wdata = 0, mem_rdata;
  logic        instr_valid = 0;
  logic [31:0] instr = 0;

  cram_bank dut (.*);

  int checks = 0, failures = 0, ncyc;
  logic [31:0] va [256], vb [256];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [11:0] waddr(int row, int slot, bit side);
    logic [1:0] arr = 2'((row >= 128 ? 2 : 0) + side);
    return {arr, 7'(row % 128), 3'(slot)};
  endfunction

  task automatic mwrite(logic [11:0] a, logic [31:0] d);
    mem_req = 1; mem_we = 1; mem_addr = a; mem_wdata = d;
    @(posedge clk); #1;
    mem_req = 0; mem_we = 0;
  endtask

  task automatic mread(logic [11:0] a, output logic [31:0] d);
    mem_req = 1; mem_we = 0; mem_addr = a;
    @(posedge clk); #1;
    mem_req = 0;
    d = mem_rdata;
  endtask

  task automatic issue(logic [31:0] w);
    instr_valid = 1; instr = w;
    @(posedge clk); #1;
    instr_valid = 0;
    ncyc++;
  endtask

  function automatic logic [7:0] col(int slot, int bitn);
    return 8'(slot * 32 + bitn);
  endfunction

  task automatic load_vectors(bit side);
    for (int r = 0; r < 256; r++) begin
      va[r] = $urandom & ((1 << N) - 1);
      vb[r] = $urandom & ((1 << N) - 1);
      mwrite(waddr(r, 0, side), va[r]);
      mwrite(waddr(r, 1, side), vb[r]);
      mwrite(waddr(r, 2, side), 32'hFFFF_FFFF);
    end
  endtask

  task automatic check_result(bit side, int slot, string name, logic [31:0] exp [256], logic [31:0] mask);
    logic [31:0] d;
    int bad;
    bad = 0;
    for (int r = 0; r < 256; r++) begin
      mread(waddr(r, slot, side), d);
      if ((d & mask) !== (exp[r] & mask)) begin
        bad++;
        if (bad < 4) $display("  %s row %0d: got %h exp %h", name, r, d & mask, exp[r] & mask);
      end
    end
    check(bad == 0, $sformatf("%s results (%0d rows wrong)", name, bad));
  endtask

  logic [31:0] exp [256];
  logic [31:0] pat;
  int seen_instr_cycles;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count cycles in which an instruction is presented (issue must be back to back)
  always @(posedge clk) if (instr_valid) seen_instr_cycles++;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ---------------- add: RESET_C, N x ADD, result N bits + carry
    load_vectors(0);
    ncyc = 0;
    begin
      time t0;
      t0 = $time;
      issue(mk_instr(OP_RESET_C, 0, 0, 0));
      for (int i = 0; i < N; i++) issue(mk_instr(OP_ADD, col(0, i), col(1, i), col(2, i)));
      check(ncyc == N + 1, "add takes N+1 instructions");
      check(($time - t0) == 64'(10 * (N + 1)), "add instructions execute back to back");
    end
    issue(mk_instr(OP_STORE_C, 0, 0, col(2, N)));
    for (int r = 0; r < 256; r++) exp[r] = va[r] + vb[r];
    check_result(0, 2, "add", exp, (1 << (N + 1)) - 1);

    // ---------------- subtract: INV B -> temp, SET_C, ADD A + temp
    load_vectors(0);
    ncyc = 0;
    for (int i = 0; i < N; i++) issue(mk_instr(OP_INV, col(1, i), 0, col(3, i)));
    issue(mk_instr(OP_SET_C, 0, 0, 0));
    for (int i = 0; i < N; i++) issue(mk_instr(OP_ADD, col(0, i), col(3, i), col(2, i)));
    check(ncyc == 2 * N + 1, "sub takes 2N+1 instructions");
    for (int r = 0; r < 256; r++) exp[r] = va[r] - vb[r];
    check_result(0, 2, "sub", exp, (1 << N) - 1);

    // ---------------- unsigned multiply (tag-conditional shift and add), on the right side
    load_vectors(1);
    ncyc = 0;
    issue(mk_instr(OP_RESET_C, 0, 0, 0, 0, 1));
    for (int i = 0; i < 2 * N; i++) issue(mk_instr(OP_STORE_C, 0, 0, col(2, i), 0, 1));
    for (int j = 0; j < N; j++) begin
      if (j >= 2) issue(mk_instr(OP_RESET_C, 0, 0, 0, 0, 1));
      issue(mk_instr(OP_LOAD_T, col(1, j), 0, 0, 0, 1));
      for (int i = 0; i < N; i++)
        if (j == 0) issue(mk_instr(OP_COPY, col(0, i), 0, col(2, i), 1, 1));
        else        issue(mk_instr(OP_ADD, col(0, i), col(2, i + j), col(2, i + j), 1, 1));
      if (j > 0) issue(mk_instr(OP_STORE_C, 0, 0, col(2, N + j), 1, 1));
    end
    check(ncyc == N * N + 5 * N - 2, $sformatf("mult takes N^2+5N-2 instructions (%0d)", ncyc));
    for (int r = 0; r < 256; r++) exp[r] = va[r] * vb[r];
    check_result(1, 2, "mult", exp, (1 << (2 * N)) - 1);

    // ---------------- XOR (N cycles)
    load_vectors(0);
    ncyc = 0;
    for (int i = 0; i < N; i++) issue(mk_instr(OP_XOR, col(0, i), col(1, i), col(2, i)));
    check(ncyc == N, "xor takes N instructions");
    for (int r = 0; r < 256; r++) exp[r] = va[r] ^ vb[r];
    check_result(0, 2, "xor", exp, (1 << N) - 1);

    // ---------------- NAND / OR / NOR / XNOR / AND on single bit columns
    issue(mk_instr(OP_NAND, col(0, 0), col(1, 0), col(2, 0)));
    issue(mk_instr(OP_OR,   col(0, 1), col(1, 1), col(2, 1)));
    issue(mk_instr(OP_NOR,  col(0, 2), col(1, 2), col(2, 2)));
    issue(mk_instr(OP_XNOR, col(0, 3), col(1, 3), col(2, 3)));
    issue(mk_instr(OP_AND,  col(0, 4), col(1, 4), col(2, 4)));
    for (int r = 0; r < 256; r++) begin
      logic [31:0] a, b;
      a = va[r]; b = vb[r];
      exp[r] = {27'b0, a[4] & b[4], ~(a[3] ^ b[3]), ~(a[2] | b[2]), a[1] | b[1], ~(a[0] & b[0])};
    end
    check_result(0, 2, "logic", exp, 32'h1F);

    // ---------------- search: rows whose A equals a pattern get tag = 1 (N cycles)
    pat = va[17];
    ncyc = 0;
    for (int i = 0; i < N; i++) issue(mk_instr(OP_EQUAL, col(0, i), 8'(pat[i]), 0, i != 0));
    check(ncyc == N, "search takes N instructions");
    issue(mk_instr(OP_STORE_T, 0, 0, col(3, 0)));
    for (int r = 0; r < 256; r++) exp[r] = {31'b0, va[r] == pat};
    check_result(0, 3, "search", exp, 32'h1);

    // ---------------- carry to tag, conditional copy
    issue(mk_instr(OP_RESET_C, 0, 0, 0));
    issue(mk_instr(OP_ADD, col(0, N - 1), col(1, N - 1), col(3, 1)));   // carry = msbA & msbB
    issue(mk_instr(OP_C_TO_T, 0, 0, 0));
    issue(mk_instr(OP_COPY, col(0, 0), 0, col(3, 2), 1));               // only where tag=1
    issue(mk_instr(OP_STORE_T, 0, 0, col(3, 3)));
    for (int r = 0; r < 256; r++) begin
      logic c;
      c = va[r][N-1] & vb[r][N-1];
      exp[r] = {28'b0, c, c ? va[r][0] : 1'b0, va[r][N-1] ^ vb[r][N-1], 1'b0};
    end
    // bit 2 is only checked in rows with tag = 1 (other rows keep older data)
    begin
      logic [31:0] d; int bad;
      bad = 0;
      for (int r = 0; r < 256; r++) begin
        mread(waddr(r, 3, 0), d);
        if (d[3] !== exp[r][3] || d[1] !== exp[r][1] || (exp[r][3] && d[2] !== exp[r][2])) bad++;
      end
      check(bad == 0, "carry-to-tag and conditional copy");
    end

    // ---------------- memory port refused while an instruction runs
    mem_req = 1; mem_we = 1; mem_addr = waddr(5, 0, 0); mem_wdata = 32'hDEAD;
    instr_valid = 1; instr = mk_instr(OP_SET_C, 0, 0, 0);
    #1 check(mem_gnt == 0, "instruction has priority over memory port");
    @(posedge clk); #1 mem_req = 0; instr_valid = 0;
    begin
      logic [31:0] d;
      mread(waddr(5, 0, 0), d);
      check(d == va[5], "refused write did not happen");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
