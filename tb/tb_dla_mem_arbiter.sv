// tb_dla_mem_arbiter: the PE-to-sector crossbar on its own. The sectors are
// modelled in the testbench as small memories with the same two-cycle read
// latency and a random grant (standing in for drowsy banks). Random requests
// from four PEs are checked each cycle against the priority rule: the
// sector's own PE first, otherwise the lowest-numbered requester; the winner's
// command must reach the sector and only granted PEs may proceed. Read data
// must come back to the right PE two cycles after its grant.
`timescale 1ns/1ps
module tb_dla_mem_arbiter;
  localparam int NPE = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NPE-1:0] pe_req = 0, pe_we = 0, pe_seq = 0, pe_gnt, pe_rvalid;
  logic [NPE-1:0][14:0] pe_addr = '0;
  logic [NPE-1:0][95:0] pe_wdata = '0, pe_rdata;
  logic [NPE-1:0] sec_req, sec_we, sec_seq, sec_gnt = '1;
  logic [NPE-1:0][12:0] sec_addr;
  logic [NPE-1:0][95:0] sec_wdata, sec_rdata;
  dla_mem_arbiter dut (.*);

  // sector models: 64 words each (address bits above 5 ignored), two-cycle reads
  logic [95:0] smem [NPE][64];
  logic [NPE-1:0] r1;
  logic [NPE-1:0][5:0] ad1;
  always_ff @(posedge clk) begin
    for (int s = 0; s < NPE; s++) begin
      r1[s]  <= sec_req[s] && sec_gnt[s] && !sec_we[s];
      ad1[s] <= sec_addr[s][5:0];
      if (sec_req[s] && sec_gnt[s] && sec_we[s]) smem[s][sec_addr[s][5:0]] <= sec_wdata[s];
      if (r1[s]) sec_rdata[s] <= smem[s][ad1[s]];
    end
  end

  int checks = 0, failures = 0, nconf = 0, nremote = 0;
  logic [95:0] ref_mem [NPE][64];
  bit known [NPE][64];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [95:0] e1 [NPE], e2 [NPE];
    bit v1 [NPE], v2 [NPE], k1 [NPE], k2 [NPE];
    int w [NPE];
    int s, n;
    for (int p = 0; p < NPE; p++) begin v1[p] = 0; v2[p] = 0; end
    for (int s0 = 0; s0 < NPE; s0++) for (int i = 0; i < 64; i++) known[s0][i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < NPE; p++) begin
        pe_req[p] = $urandom % 3 != 0;
        pe_we[p] = $urandom % 2;
        pe_seq[p] = $urandom % 2;
        pe_addr[p] = 15'({2'($urandom % 2 ? p : $urandom), 7'($urandom), 6'($urandom)});
        pe_wdata[p] = {$urandom, $urandom, $urandom};
      end
      sec_gnt = NPE'($urandom) | NPE'($urandom);
      #1;
      // reference winners
      for (int s0 = 0; s0 < NPE; s0++) begin
        w[s0] = -1; n = 0;
        for (int p = NPE - 1; p >= 0; p--)
          if (pe_req[p] && pe_addr[p][14:13] == 2'(s0)) begin w[s0] = p; n++; end
        if (pe_req[s0] && pe_addr[s0][14:13] == 2'(s0)) w[s0] = s0;
        if (n > 1) nconf++;
        check(sec_req[s0] == (w[s0] >= 0), "sector request");
        if (w[s0] >= 0) begin
          if (w[s0] != s0) nremote++;
          check(sec_addr[s0] == pe_addr[w[s0]][12:0] && sec_we[s0] == pe_we[w[s0]] &&
                sec_seq[s0] == pe_seq[w[s0]] && sec_wdata[s0] == pe_wdata[w[s0]], "winner's command routed");
        end
      end
      for (int p = 0; p < NPE; p++) begin
        s = pe_addr[p][14:13];
        check(pe_gnt[p] == (pe_req[p] && w[s] == p && sec_gnt[s]), $sformatf("grant of PE %0d", p));
        check(pe_rvalid[p] == v2[p], "rvalid timing");
        if (v2[p] && k2[p]) check(pe_rdata[p] === e2[p], $sformatf("read data of PE %0d", p));
      end
      for (int p = 0; p < NPE; p++) begin
        int a;
        v2[p] = v1[p]; k2[p] = k1[p]; e2[p] = e1[p]; v1[p] = 0;
        s = pe_addr[p][14:13]; a = pe_addr[p][5:0];
        if (pe_gnt[p]) begin
          if (pe_we[p]) begin ref_mem[s][a] = pe_wdata[p]; known[s][a] = 1; end
          else begin v1[p] = 1; k1[p] = known[s][a]; e1[p] = ref_mem[s][a]; end
        end
      end
    end
    check(nconf > 0, "conflicts occurred");
    check(nremote > 0, "remote-sector accesses occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
