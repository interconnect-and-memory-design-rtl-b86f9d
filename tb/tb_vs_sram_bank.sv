// tb_vs_sram_bank: full-size voltage-stacked bank (4 arrays x 256 x 128 bit).
// A requester keeps each access asserted until it is granted. Random writes and
// reads are issued under changing top/bottom configurations; every read must
// return the last value written to that address, one cycle after the grant,
// whatever swaps happened in between, and accesses to top arrays must cost
// exactly one extra cycle.
`timescale 1ns/1ps
module tb_vs_sram_bank;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0, req = 0, we = 0, gnt, rvalid, periph_on, swapping;
  logic [3:0] cfg_top = 0, top, expand;
  logic [9:0] addr = 0;
  logic [127:0] wdata = 0, rdata;
  vs_sram_bank dut (.*);

  int checks = 0, failures = 0, nswap = 0;
  logic [127:0] ref_mem [1024];
  bit written [1024];

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

  task automatic access(bit w, int a, logic [127:0] d);
    int waits;
    bit was_top;
    @(negedge clk);
    req = 1; we = w; addr = 10'(a); wdata = d;
    waits = 0;
    #1 was_top = top[a / 256];
    while (!gnt) begin
      check(swapping, "refused only while swapping");
      nswap++;
      @(negedge clk); #1; waits++;
    end
    check(waits == int'(was_top), "one extra cycle only for a top array");
    @(posedge clk);
    @(negedge clk);
    req = 0;
    if (!w) begin
      check(rvalid, "rvalid after read");
      if (written[a]) check(rdata === ref_mem[a], $sformatf("read data at %0d", a));
    end
  endtask

  initial begin
    int a;
    logic [127:0] d;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 1024; i++) written[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      if (i % 200 == 0) begin
        @(negedge clk);
        cfg_we = 1; cfg_top = 4'($urandom % 15);
        if (cfg_top == 4'hF) cfg_top = 4'h3;
        @(negedge clk);
        cfg_we = 0;
      end
      a = $urandom % 1024;
      if ($urandom % 2) begin
        d = {$urandom, $urandom, $urandom, $urandom};
        access(1, a, d);
        ref_mem[a] = d; written[a] = 1;
      end else
        access(0, a, 0);
    end
    check(nswap > 0, "swaps occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
