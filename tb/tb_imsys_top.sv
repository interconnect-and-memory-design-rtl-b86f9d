// tb_imsys_top: end-to-end test of the three memory subsystems at their
// default (published) sizes, run concurrently.
//  CRAM:  the CPU port writes two 8-bit vectors into compute bank 3 and an
//         add program into bank 2, the control bus streams the program from
//         bank 2 to bank 3 while the CPU keeps using bank 0, and the CPU then
//         reads the 256 sums back. CPU accesses to banks 2 and 3 during the
//         run must be refused (instructions have priority).
//  DLA:   four PEs run random and sequential traffic on the four NUMA sectors
//         with drowsy schedules; read data is compared with a reference. A
//         sequential burst is issued without gaps, as the bank decoders require.
//  VS:    random accesses to the voltage-stacked bank under changing top /
//         bottom configurations; read data is compared with a reference.
// Each mechanism is counted and the test fails if any of them never happened:
// program streaming, CPU refusal, instruction execution, sector conflict,
// remote-sector access, drowsy wake-up, level gating, sequential access and
// array swap.
`timescale 1ns/1ps
module tb_imsys_top;
  import cram_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cram_cpu_req = 0, cram_cpu_we = 0, cram_cpu_gnt;
  logic [14:0] cram_cpu_addr = 0;
  logic [31:0] cram_cpu_wdata = 0, cram_cpu_rdata;
  logic        cram_cb_start = 0, cram_cb_busy, cram_cb_done;
  logic [2:0]  cram_cb_src_bank = 0;
  logic [11:0] cram_cb_src_addr = 0;
  logic [15:0] cram_cb_count = 0;
  logic [7:0]  cram_cb_bank_mask = 0;
  logic [3:0]  dla_pe_req = 0, dla_pe_we = 0, dla_pe_seq = 0, dla_pe_gnt, dla_pe_rvalid, dla_sched_we = 0;
  logic [3:0][14:0] dla_pe_addr = '0;
  logic [3:0][95:0] dla_pe_wdata = '0, dla_pe_rdata;
  logic [3:0][15:0] dla_sched_mask = '0, dla_drowsy, dla_wake;
  logic        vs_cfg_we = 0, vs_req = 0, vs_we = 0, vs_gnt, vs_rvalid, vs_periph_on, vs_swapping;
  logic [3:0]  vs_cfg_top = 0, vs_top, vs_expand;
  logic [9:0]  vs_addr = 0;
  logic [127:0] vs_wdata = 0, vs_rdata;

  imsys_top dut (.*);

  int checks = 0, failures = 0;
  int n_stream = 0, n_refuse = 0, n_exec = 0, n_conf = 0, n_remote = 0, n_wake = 0,
      n_gate = 0, n_seq = 0, n_swap = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // ------------------------------------------------------------------ CRAM
  localparam int N = 8;
  logic [31:0] va [256], vb [256];

  function automatic logic [14:0] caddr(int bank, int row, int slot);
    return {3'(bank), 2'(row >= 128 ? 2 : 0), 7'(row % 128), 3'(slot)};
  endfunction

  // one CPU access, held until granted; returns read data
  task automatic cpu(bit w, logic [14:0] a, logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    cram_cpu_req = 1; cram_cpu_we = w; cram_cpu_addr = a; cram_cpu_wdata = d;
    #1;
    while (!cram_cpu_gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    cram_cpu_req = 0;
    q = cram_cpu_rdata;
  endtask

  task automatic cram_test();
    logic [31:0] q, prog [$];
    int bad;
    for (int r = 0; r < 256; r++) begin
      va[r] = $urandom % 256; vb[r] = $urandom % 256;
      cpu(1, caddr(3, r, 0), va[r], q);
      cpu(1, caddr(3, r, 1), vb[r], q);
    end
    prog.push_back(mk_instr(OP_RESET_C, 0, 0, 0));
    for (int i = 0; i < N; i++) prog.push_back(mk_instr(OP_ADD, 8'(i), 8'(32 + i), 8'(64 + i)));
    prog.push_back(mk_instr(OP_STORE_C, 0, 0, 8'(64 + N)));
    for (int i = 0; i < prog.size(); i++) cpu(1, {3'd2, 12'(i)}, prog[i], q);
    // stream bank 2 -> bank 3 while the CPU works in bank 0
    @(negedge clk);
    cram_cb_src_bank = 2; cram_cb_src_addr = 0; cram_cb_count = 16'(prog.size());
    cram_cb_bank_mask = 8'b0000_1000; cram_cb_start = 1;
    @(negedge clk);
    cram_cb_start = 0;
    n_stream++;
    for (int i = 0; cram_cb_busy; i++) begin
      cram_cpu_req = 1; cram_cpu_we = 0;
      cram_cpu_addr = (i % 2) ? caddr(3, 5, 0) : caddr(2, 0, 0);
      #1;
      if (!cram_cpu_gnt) n_refuse++;
      if (dut.u_cram.g_bank[3].u_bank.instr_valid) n_exec++;
      @(negedge clk);
      cram_cpu_req = 0;
    end
    @(negedge clk);
    check(n_exec == prog.size(), $sformatf("bank 3 executed %0d instructions", n_exec));
    // bank 0 still usable
    cpu(1, caddr(0, 7, 3), 32'h1234_5678, q);
    cpu(0, caddr(0, 7, 3), 0, q);
    check(q == 32'h1234_5678, "CPU memory in bank 0");
    bad = 0;
    for (int r = 0; r < 256; r++) begin
      cpu(0, caddr(3, r, 2), 0, q);
      if ((q & 32'h1FF) != va[r] + vb[r]) bad++;
    end
    check(bad == 0, $sformatf("CRAM sums (%0d rows wrong)", bad));
  endtask

  // ------------------------------------------------------------------ DLA
  localparam int SEC = 5760;
  logic [95:0] dref [4*SEC];
  bit dknown [4*SEC];

  task automatic dla_test();
    logic [95:0] e1 [4], e2 [4];
    bit v1 [4], v2 [4], k1 [4], k2 [4], done [4];
    int blen [4], bi [4], bbase [4], boff [4], a, s, n;
    for (int i = 0; i < 4 * SEC; i++) dknown[i] = 0;
    for (int p = 0; p < 4; p++) begin v1[p] = 0; v2[p] = 0; done[p] = 0; blen[p] = 0; bi[p] = 0; end
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin if (done[p]) dla_pe_req[p] = 0; done[p] = 0; end
      dla_sched_we = '0;
      if ($urandom % 40 == 0) begin
        s = $urandom % 4; dla_sched_we[s] = 1; dla_sched_mask[s] = 16'($urandom);
      end
      for (int p = 0; p < 4; p++)
        if (!dla_pe_req[p] && ($urandom % 4 != 0 || bi[p] < blen[p])) begin
          if (bi[p] >= blen[p] && $urandom % 8 == 0) begin
            bbase[p] = 1664 + ($urandom % 4) * 1024;   // a 12 kB level-4 bank
            boff[p] = $urandom % 1024; blen[p] = 2 + $urandom % 30; bi[p] = 0;
          end
          if (bi[p] < blen[p]) begin
            dla_pe_seq[p] = bi[p] != 0;
            dla_pe_addr[p] = {2'(p), 13'(bbase[p] + (boff[p] + bi[p]) % 1024)};
          end else begin
            dla_pe_seq[p] = 0;
            dla_pe_addr[p] = {2'($urandom % 4 == 0 ? $urandom : p), 13'($urandom % SEC)};
          end
          dla_pe_we[p] = $urandom % 2;
          dla_pe_wdata[p] = {$urandom, $urandom, $urandom};
          dla_pe_req[p] = 1;
        end
      #1;
      for (int p = 0; p < 4; p++) begin
        check(dla_pe_rvalid[p] == v2[p], "DLA rvalid timing");
        if (v2[p] && k2[p]) check(dla_pe_rdata[p] === e2[p], $sformatf("DLA PE %0d read data", p));
        if (|dla_wake[p]) n_wake++;
      end
      for (int s0 = 0; s0 < 4; s0++) begin
        n = 0;
        for (int p = 0; p < 4; p++) if (dla_pe_req[p] && dla_pe_addr[p][14:13] == 2'(s0)) n++;
        if (n > 1) n_conf++;
      end
      // level gating in sector 0: an idle level sees zero address lines
      if (dut.u_dla.g_sec[0].u_mem.acc) begin
        bit ok;
        ok = 1;
        if (!dut.u_dla.g_sec[0].u_mem.g_lvl[0].l_on && dut.u_dla.g_sec[0].u_mem.g_lvl[0].l_wdata != 0) ok = 0;
        if (!dut.u_dla.g_sec[0].u_mem.g_lvl[3].l_on && dut.u_dla.g_sec[0].u_mem.g_lvl[3].l_wdata != 0) ok = 0;
        check(ok, "level gating");
        n_gate++;
      end
      for (int p = 0; p < 4; p++) begin
        v2[p] = v1[p]; e2[p] = e1[p]; k2[p] = k1[p]; v1[p] = 0;
        if (dla_pe_req[p] && dla_pe_gnt[p]) begin
          a = dla_pe_addr[p][14:13] * SEC + dla_pe_addr[p][12:0];
          if (dla_pe_addr[p][14:13] != 2'(p)) n_remote++;
          if (dla_pe_we[p]) begin dref[a] = dla_pe_wdata[p]; dknown[a] = 1; end
          else begin v1[p] = 1; e1[p] = dref[a]; k1[p] = dknown[a]; end
          if (dla_pe_seq[p]) n_seq++;
          if (bi[p] < blen[p]) bi[p]++;
          done[p] = 1;
        end
      end
    end
    @(negedge clk);
    dla_pe_req = '0;
  endtask

  // ------------------------------------------------------------------ VS
  logic [127:0] vref [1024];
  bit vknown [1024];

  task automatic vs_test();
    int a;
    bit w;
    logic [127:0] d;
    for (int i = 0; i < 1024; i++) vknown[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i % 300 == 0) begin
        vs_cfg_we = 1; vs_cfg_top = 4'($urandom % 15);
        @(negedge clk);
        vs_cfg_we = 0;
      end
      a = $urandom % 1024; w = $urandom % 2; d = {$urandom, $urandom, $urandom, $urandom};
      vs_req = 1; vs_we = w; vs_addr = 10'(a); vs_wdata = d;
      #1;
      while (!vs_gnt) begin
        if (vs_swapping) n_swap++;
        @(negedge clk); #1;
      end
      @(negedge clk);
      vs_req = 0;
      if (w) begin vref[a] = d; vknown[a] = 1; end
      else begin
        check(vs_rvalid, "VS rvalid");
        if (vknown[a]) check(vs_rdata === vref[a], "VS read data");
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      cram_test();
      dla_test();
      vs_test();
    join
    check(n_stream > 0, "program streaming");
    check(n_refuse > 0, "CPU refused during streaming");
    check(n_exec > 0, "instructions executed");
    check(n_conf > 0, "DLA sector conflicts");
    check(n_remote > 0, "DLA remote-sector accesses");
    check(n_wake > 0, "DLA drowsy wake-ups");
    check(n_gate > 0, "DLA level gating observed");
    check(n_seq > 0, "DLA sequential accesses");
    check(n_swap > 0, "VS array swaps");
    $display("mechanisms: stream=%0d refuse=%0d exec=%0d conflict=%0d remote=%0d wake=%0d gate=%0d seq=%0d swap=%0d",
             n_stream, n_refuse, n_exec, n_conf, n_remote, n_wake, n_gate, n_seq, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
