// tb_dla_seq_decoder: 256-row sequential decoder with 16-row clock groups.
// Random loads and long sequential runs are compared with a reference row
// counter: the word-line vector must be one-hot at the expected row, wrap must
// pulse on the step out of the last row, and only the group holding the token
// plus the group the token enters next may have its clock enabled.
`timescale 1ns/1ps
module tb_dla_seq_decoder;
  localparam int ROWS = 256, GROUP = 16, NG = ROWS / GROUP;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, seq = 0, wrap;
  logic [7:0] addr = 0;
  logic [ROWS-1:0] wl;
  logic [NG-1:0] grp_en;
  dla_seq_decoder dut (.*);

  int checks = 0, failures = 0, row = 0, nwrap = 0;

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
    bit l, s;
    logic [NG-1:0] allowed;
    int g;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      l = ($urandom % 40) == 0;
      s = !l && ($urandom % 8 != 0);
      load = l; seq = s; addr = 8'($urandom);
      #1;
      check(wrap == (s && row == ROWS - 1), $sformatf("wrap at row %0d", row));
      if (wrap) nwrap++;
      if (l) row = addr;
      else if (s) row = (row + 1) % ROWS;
      @(posedge clk); #1;
      check(wl == (ROWS'(1) << row), $sformatf("word-line for row %0d", row));
      g = row / GROUP;
      allowed = '0;
      allowed[g] = 1'b1;
      allowed[(g + 1) % NG] = 1'b1;
      check((grp_en & ~allowed) == 0 && grp_en[g], $sformatf("clock groups %h at row %0d", grp_en, row));
    end
    check(nwrap > 0, "a wrap occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
