// tb_dla_mem_system: four PEs on four 67.5 kB NUMA sectors, full size.
// Each PE holds a request until it is granted. PEs mostly use their own sector
// in sequential bursts, and sometimes reach into other sectors with random
// accesses, so several PEs compete for one sector. Drowsy schedules are written
// at random. Every granted access updates a reference copy of the whole
// 4 x 5760-word space; every read must return the reference value two cycles
// after its grant. Conflicts, drowsy wake-ups and sequential accesses are
// counted and must all occur.
`timescale 1ns/1ps
module tb_dla_mem_system;
  localparam int NPE = 4, SEC = 5760;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NPE-1:0] pe_req = 0, pe_we = 0, pe_seq = 0, pe_gnt, pe_rvalid, sched_we = 0;
  logic [NPE-1:0][14:0] pe_addr = '0;
  logic [NPE-1:0][95:0] pe_wdata = '0, pe_rdata;
  logic [NPE-1:0][15:0] sched_mask = '0, drowsy, wake;
  dla_mem_system dut (.*);

  int checks = 0, failures = 0, nconf = 0, nwake = 0, nseq = 0, nrd = 0;
  logic [95:0] ref_mem [NPE*SEC];
  bit          known [NPE*SEC];     // written at least once
  // expected read data per PE, two stages
  logic [95:0] e1 [NPE], e2 [NPE];
  bit v1 [NPE], v2 [NPE], done [NPE];
  int a1 [NPE], a2 [NPE];
  bit k1 [NPE], k2 [NPE];
  // burst state per PE
  int blen [NPE], boff [NPE], bbase [NPE], bw [NPE], bi [NPE];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", msg); end
  endtask

  // bank geometry of a sector: level sizes and bases
  function automatic int lw(int l);
    return l == 0 ? 32 : l == 1 ? 128 : l == 2 ? 256 : 1024;
  endfunction
  function automatic int lbase(int l);
    return l == 0 ? 0 : l == 1 ? 128 : l == 2 ? 640 : 1664;
  endfunction

  task automatic new_req(int p);
    int s, l, k;
    logic [95:0] d;
    if (bi[p] < blen[p]) begin
      // next step of a sequential burst in the own sector
      pe_seq[p] = bi[p] != 0;
      pe_addr[p] = 15'({p, 13'(bbase[p] + (boff[p] + bi[p]) % bw[p])});
    end else begin
      pe_seq[p] = 0;
      s = ($urandom % 4 == 0) ? $urandom % NPE : p;
      pe_addr[p] = 15'({s, 13'($urandom % SEC)});
    end
    pe_we[p] = $urandom % 2;
    d = {$urandom, $urandom, $urandom};
    pe_wdata[p] = d;
    pe_req[p] = 1;
  endtask

  initial begin
    int a;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NPE * SEC; i++) begin ref_mem[i] = '0; known[i] = 0; end
    for (int p = 0; p < NPE; p++) begin
      v1[p] = 0; v2[p] = 0; done[p] = 0; blen[p] = 0; bi[p] = 0;
    end
    // reads of words that were never written are not compared
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      sched_we = '0;
      if ($urandom % 60 == 0) begin
        int p;
        p = $urandom % NPE;
        sched_we[p] = 1;
        sched_mask[p] = 16'($urandom);
      end
      for (int p = 0; p < NPE; p++) begin
        if (done[p]) pe_req[p] = 0;
        done[p] = 0;
      end
      for (int p = 0; p < NPE; p++)
        if (!pe_req[p]) begin
          if (bi[p] >= blen[p] && $urandom % 8 == 0) begin
            int l, k;
            l = $urandom % 4; k = $urandom % 4;
            bw[p] = lw(l); bbase[p] = lbase(l) + k * lw(l);
            boff[p] = $urandom % bw[p]; blen[p] = 2 + $urandom % 40; bi[p] = 0;
          end
          if ($urandom % 4 != 0 || bi[p] < blen[p]) new_req(p);
        end
      #1;
      // reads granted two cycles ago
      for (int p = 0; p < NPE; p++) begin
        check(pe_rvalid[p] == v2[p], "rvalid timing");
        if (v2[p] && k2[p]) check(pe_rdata[p] === e2[p], $sformatf("PE %0d read data a=%0d got %h exp %h", p, a2[p], pe_rdata[p], e2[p]));
      end
      // conflicts: two requests to one sector in the same cycle
      for (int s = 0; s < NPE; s++) begin
        int n;
        n = 0;
        for (int p = 0; p < NPE; p++) if (pe_req[p] && pe_addr[p][14:13] == 2'(s)) n++;
        if (n > 1) nconf++;
      end
      for (int p = 0; p < NPE; p++) if (|wake[p]) nwake++;
      for (int p = 0; p < NPE; p++) begin
        v2[p] = v1[p]; e2[p] = e1[p]; a2[p] = a1[p]; k2[p] = k1[p]; v1[p] = 0;
        if (pe_req[p] && pe_gnt[p]) begin
          a = pe_addr[p][14:13] * SEC + pe_addr[p][12:0];
          if (pe_we[p]) begin ref_mem[a] = pe_wdata[p]; known[a] = 1; end
          else begin v1[p] = 1; a1[p] = a; k1[p] = known[a]; e1[p] = ref_mem[a]; nrd++; end
          if (pe_seq[p]) nseq++;
          if (bi[p] < blen[p]) bi[p]++;
          done[p] = 1;
        end
      end
    end
    check(nconf > 0, "sector conflicts occurred");
    check(nwake > 0, "drowsy wake-ups occurred");
    check(nseq > 0, "sequential accesses occurred");
    check(nrd > 0, "reads occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
