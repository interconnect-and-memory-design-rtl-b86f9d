// tb_cram_ctrl_bus: a small memory model answers the control bus's fetches
// with one cycle latency; the test checks that the words are fetched in order
// from the right bank, broadcast one per cycle to exactly the masked banks,
// that count instructions take count+1 cycles from start to the last
// broadcast, and that done pulses once.
`timescale 1ns/1ps
module tb_cram_ctrl_bus;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, rd_req;
  logic [2:0] src_bank = 0, rd_bank;
  logic [11:0] src_addr = 0, rd_addr;
  logic [15:0] count = 0;
  logic [7:0] bank_mask = 0, bc_valid;
  logic [31:0] rd_data, bc_instr;

  cram_ctrl_bus dut (.*);

  always_ff @(posedge clk) if (rd_req) rd_data <= {5'(rd_bank), 15'd0, rd_addr} ^ 32'hA5000000;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      int n, got, cyc, dones;
      logic [11:0] a0;
      n = 1 + $urandom % 40; a0 = 12'($urandom);
      src_bank = 3'(2 + run % 2); src_addr = a0; count = 16'(n);
      bank_mask = (8'($urandom) | 8'h80) & ~(8'd1 << src_bank);
      start = 1; @(posedge clk); #1; start = 0;
      got = 0; cyc = 0; dones = 0;
      while (busy || got == 0) begin
        cyc++;
        if (bc_valid != 0) begin
          check(bc_valid == bank_mask, "broadcast mask");
          check(bc_instr == ({5'(src_bank), 15'd0, 12'(a0 + got)} ^ 32'hA5000000), "instruction order");
          got++;
          check(cyc == got + 1, "one instruction per cycle after one start-up cycle");
        end
        @(posedge clk); #1;
        if (done) dones++;
        if (cyc > 100) break;
      end
      check(got == n, $sformatf("all %0d instructions broadcast (%0d)", n, got));
      check(dones == 1, "done pulses once");
      repeat (2) @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
