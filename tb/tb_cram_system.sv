// tb_cram_system: the test-chip configuration at full size. Bank 0/1 act as
// CPU memory, bank 2 holds a CRAM program (8-bit add with carry out, then an
// 8-bit subtract into a second slot), banks 3-7 compute. The CPU port loads
// operand vectors into the five compute banks and the program into bank 2,
// starts the control bus, and keeps reading and writing bank 0 while the
// program streams. Checks: every compute bank's results, the program takes
// count+1 cycles, the CPU is served in bank 0 during streaming and refused in
// the source bank while it is being fetched.
`timescale 1ns/1ps
module tb_cram_system;
  import cram_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cpu_req = 0, cpu_we = 0, cpu_gnt;
  logic [14:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic cb_start = 0, cb_busy, cb_done;
  logic [2:0] cb_src_bank = 2;
  logic [11:0] cb_src_addr = 12'h100;
  logic [15:0] cb_count = 0;
  logic [7:0] cb_bank_mask = 8'hF8;

  cram_system dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  task automatic wr(logic [14:0] a, logic [31:0] d);
    cpu_req = 1; cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    do @(posedge clk); while (!cpu_gnt);
    #1 cpu_req = 0; cpu_we = 0;
  endtask
  task automatic rd(logic [14:0] a, output logic [31:0] d);
    cpu_req = 1; cpu_we = 0; cpu_addr = a;
    do @(posedge clk); while (!cpu_gnt);
    #1 cpu_req = 0; d = cpu_rdata;
  endtask
  function automatic logic [14:0] ea(int bank, int row, int slot);
    return {3'(bank), 2'(row >= 128 ? 2 : 0), 7'(row % 128), 3'(slot)};
  endfunction
  function automatic logic [7:0] col(int slot, int b);
    return 8'(slot * 32 + b);
  endfunction

  logic [31:0] prog [$];
  logic [7:0] va [8][256], vb [8][256];

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // program: add A+B -> slot2 (N+1 bits); B-A -> slot3
    prog.push_back(mk_instr(OP_RESET_C, 0, 0, 0));
    for (int i = 0; i < N; i++) prog.push_back(mk_instr(OP_ADD, col(0, i), col(1, i), col(2, i)));
    prog.push_back(mk_instr(OP_STORE_C, 0, 0, col(2, N)));
    for (int i = 0; i < N; i++) prog.push_back(mk_instr(OP_INV, col(0, i), 0, col(3, i)));
    prog.push_back(mk_instr(OP_SET_C, 0, 0, 0));
    for (int i = 0; i < N; i++) prog.push_back(mk_instr(OP_ADD, col(1, i), col(3, i), col(3, i)));
    foreach (prog[i]) wr({3'd2, 12'(12'h100 + i)}, prog[i]);
    for (int b = 3; b < 8; b++)
      for (int r = 0; r < 256; r++) begin
        va[b][r] = 8'($urandom); vb[b][r] = 8'($urandom);
        wr(ea(b, r, 0), {24'd0, va[b][r]});
        wr(ea(b, r, 1), {24'd0, vb[b][r]});
      end
    wr(ea(0, 5, 0), 32'h1234_5678);

    cb_count = 16'(prog.size());
    cb_start = 1; @(posedge clk); #1 cb_start = 0;
    begin
      int cyc, cpu_ok, refused;
      logic [31:0] d;
      cyc = 1; cpu_ok = 0; refused = 0;
      // CPU works in bank 0 while the program streams; also probes bank 2
      while (cb_busy) begin
        cpu_req = 1; cpu_we = 0; cpu_addr = (cyc % 2) ? ea(0, 5, 0) : {3'd2, 12'h000};
        #1;
        if (cyc % 2) cpu_ok += int'(cpu_gnt);
        else if (cyc < prog.size()) refused += int'(!cpu_gnt);
        @(posedge clk); #1;
        cpu_req = 0;
        if ((cyc % 2) == 1) check(cpu_rdata == 32'h1234_5678, $sformatf("CPU read during streaming cyc %0d got %h", cyc, cpu_rdata));
        if (cb_busy) cyc++;
      end
      check(cyc == prog.size() + 1, $sformatf("program of %0d instructions streams in count+1 cycles (%0d)", prog.size(), cyc));
      check(cpu_ok > 0, "CPU served in bank 0 while streaming");
      check(refused > 0, "CPU refused in source bank while fetching");
    end
    for (int b = 3; b < 8; b++) begin
      int bad;
      logic [31:0] s, t;
      bad = 0;
      for (int r = 0; r < 256; r++) begin
        rd(ea(b, r, 2), s);
        rd(ea(b, r, 3), t);
        if (s[N:0] != 9'(va[b][r] + vb[b][r]) || t[N-1:0] != 8'(vb[b][r] - va[b][r])) bad++;
      end
      check(bad == 0, $sformatf("bank %0d results (%0d rows wrong)", b, bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
