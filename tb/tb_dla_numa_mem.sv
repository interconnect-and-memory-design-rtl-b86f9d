// tb_dla_numa_mem: one full-size 67.5 kB NUMA sector (4 levels x 4 banks).
// A single requester issues random accesses and sequential bursts in every
// bank while drowsy schedules are written at random. Checks: read data equals
// a reference copy two cycles after the grant; a request to a drowsy bank is
// refused for exactly one cycle while the bank wakes; and the address and
// data lines of every level that is not accessed stay at zero (level gating).
`timescale 1ns/1ps
module tb_dla_numa_mem;
  localparam int SEC = 5760;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req = 0, we = 0, seq = 0, gnt, sched_we = 0;
  logic [12:0] addr = 0;
  logic [95:0] wdata = 0, rdata;
  logic [15:0] sched_mask = 0, drowsy, pg_en, clamp_en, wake;
  dla_numa_mem dut (.*);

  int checks = 0, failures = 0, nwake = 0, nseq = 0, nref = 0;
  logic [95:0] ref_mem [SEC];
  bit known [SEC];

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

  function automatic int lw(int l);
    return l == 0 ? 32 : l == 1 ? 128 : l == 2 ? 256 : 1024;
  endfunction
  function automatic int lbase(int l);
    return l == 0 ? 0 : l == 1 ? 128 : l == 2 ? 640 : 1664;
  endfunction

  initial begin
    logic [95:0] e1, e2;
    bit v1, v2, k1, k2, done, refused;
    int blen, boff, bbase, bw, bi, a, lvl;
    v1 = 0; v2 = 0; done = 0; refused = 0; blen = 0; bi = 0; lvl = 0;
    for (int i = 0; i < SEC; i++) known[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge clk);
      if (done) req = 0;
      done = 0;
      sched_we = $urandom % 50 == 0;
      sched_mask = 16'($urandom);
      if (!req && $urandom % 4 != 0) begin
        if (bi >= blen && $urandom % 6 == 0) begin
          lvl = $urandom % 4;
          bw = lw(lvl); bbase = lbase(lvl) + ($urandom % 4) * bw;
          boff = $urandom % bw; blen = 2 + $urandom % 60; bi = 0;
        end
        if (bi < blen) begin
          seq = bi != 0; addr = 13'(bbase + (boff + bi) % bw);
        end else begin
          seq = 0; addr = 13'($urandom % SEC);
        end
        we = $urandom % 2;
        wdata = {$urandom, $urandom, $urandom};
        req = 1;
        refused = 0;
      end
      #1;
      check(gnt == (req && !drowsy[{dut.lvl, dut.bnk}]), "grant follows bank drowsy state");
      if (req && !gnt) begin
        check(!refused, "refused at most once");
        check(wake != 0, "wake raised for refused request");
        refused = 1; nwake++;
      end
      // level gating: idle levels see all-zero address and data lines
      check((dut.g_lvl[0].l_on || (dut.g_lvl[0].l_addr == 0 && dut.g_lvl[0].l_wdata == 0)) &&
            (dut.g_lvl[1].l_on || (dut.g_lvl[1].l_addr == 0 && dut.g_lvl[1].l_wdata == 0)) &&
            (dut.g_lvl[2].l_on || (dut.g_lvl[2].l_addr == 0 && dut.g_lvl[2].l_wdata == 0)) &&
            (dut.g_lvl[3].l_on || (dut.g_lvl[3].l_addr == 0 && dut.g_lvl[3].l_wdata == 0)),
            "level gating");
      if (v2 && k2) begin check(rdata === e2, $sformatf("read data %h exp %h", rdata, e2)); nref++; end
      v2 = v1; e2 = e1; k2 = k1; v1 = 0;
      if (req && gnt) begin
        a = addr;
        if (we) begin ref_mem[a] = wdata; known[a] = 1; end
        else begin v1 = 1; e1 = ref_mem[a]; k1 = known[a]; end
        if (seq) nseq++;
        if (bi < blen) bi++;
        done = 1;
      end
    end
    check(nwake > 0, "drowsy wake-ups occurred");
    check(nseq > 0, "sequential accesses occurred");
    check(nref > 0, "reads compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
