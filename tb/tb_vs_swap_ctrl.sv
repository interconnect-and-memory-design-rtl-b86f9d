// tb_vs_swap_ctrl: four-array top/bottom domain controller against a reference.
// Random configurations with 0-3 top arrays and random access requests: a
// request to a bottom array is granted at once; a request to a top array is
// refused for one cycle while that array swaps with the lowest bottom array,
// both arrays expand in that cycle, and the access is granted the next cycle.
`timescale 1ns/1ps
module tb_vs_swap_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0, req = 0, go, swapping;
  logic [3:0] cfg_top = 0, top, expand;
  logic [1:0] arr = 0;
  vs_swap_ctrl dut (.*);

  int checks = 0, failures = 0, nswap = 0;
  logic [3:0] model = '0;

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
    int partner;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      cfg_we = ($urandom % 25) == 0;
      cfg_top = 4'($urandom);
      if (cfg_top == 4'hF) cfg_top = 4'h7;
      req = !cfg_we && ($urandom % 4 != 0);
      arr = 2'($urandom);
      #1;
      check(top == model, "top-array set");
      partner = -1;
      for (int a = 3; a >= 0; a--) if (!model[a]) partner = a;
      check(go == (req && !model[arr]), "grant");
      check(swapping == (req && model[arr]), "swap");
      if (req && model[arr]) begin
        logic [3:0] e;
        e = '0; e[arr] = 1'b1; e[partner] = 1'b1;
        check(expand == e, "expanded arrays during swap");
        nswap++;
        model[arr] = 1'b0; model[partner] = 1'b1;
      end else
        check(expand == 0, "no expansion without swap");
      if (cfg_we) model = cfg_top;
    end
    check(nswap > 0, "swaps occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
