// tb_dla_drowsy_ctrl: 16-bank drowsy controller against a reference model.
// Random schedule writes and random access demands; checks that a demanded
// drowsy bank raises wake and is not ready in that cycle, is awake the next
// cycle, that scheduled banks go drowsy unless demanded, and that the power
// gate and clamp enables follow the drowsy state.
`timescale 1ns/1ps
module tb_dla_drowsy_ctrl;
  localparam int NB = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sched_we = 0;
  logic [NB-1:0] sched_mask = 0, need = 0, drowsy, ready, wake, pg_en, clamp_en;
  dla_drowsy_ctrl dut (.*);

  int checks = 0, failures = 0, nwake = 0;
  logic [NB-1:0] model = '0;

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
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      sched_we = ($urandom % 10) == 0;
      sched_mask = NB'($urandom);
      need = NB'($urandom) & NB'($urandom) & NB'($urandom);
      #1;
      check(drowsy == model, "drowsy state");
      check(wake == (need & model), "wake request");
      check(ready == ~model, "ready");
      check(pg_en == model && clamp_en == model, "power gate / clamp enables");
      if (|wake) nwake++;
      if (sched_we) model = sched_mask & ~need;
      else          model = model & ~need;
    end
    check(nwake > 0, "wake-ups occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
