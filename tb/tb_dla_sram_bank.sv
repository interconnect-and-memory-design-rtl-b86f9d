// tb_dla_sram_bank: full-size (1024 x 96) DLA SRAM bank.
// Fills the bank with one random access followed by a sequential burst that
// crosses every sub-array boundary, then reads it back with random accesses
// and with sequential bursts starting at random addresses, comparing against a
// reference copy. Read data must appear exactly two edges after the request.
`timescale 1ns/1ps
module tb_dla_sram_bank;
  localparam int WORDS = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, we = 0, seq = 0, drowsy = 0;
  logic [9:0]  addr = 0;
  logic [95:0] wdata = 0, rdata;
  dla_sram_bank dut (.*);

  int checks = 0, failures = 0;
  logic [95:0] ref_mem [WORDS];
  logic [95:0] pend [$];   // expected read data, two cycles behind

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [95:0] rnd96();
    return {$urandom, $urandom, $urandom};
  endfunction

  // expected data queue: entry pushed per cycle, checked two cycles later
  logic [95:0] e1, e2;
  bit v1 = 0, v2 = 0;
  always @(posedge clk) begin
    #1;
    if (v2) begin
      checks++;
      if (rdata !== e2) begin failures++; if (failures < 6) $display("FAIL: read %h exp %h", rdata, e2); end
    end
  end

  task automatic cycle(bit e, bit w, bit s, int a, logic [95:0] d, bit is_read, logic [95:0] exp);
    en = e; we = w; seq = s; addr = 10'(a); wdata = d;
    @(posedge clk);
    v2 = v1; e2 = e1; v1 = is_read; e1 = exp;
  endtask

  initial begin
    int a;
    logic [95:0] d;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    // fill: random access to 0, then sequential writes to 1..WORDS-1
    for (int i = 0; i < WORDS; i++) begin
      d = rnd96(); ref_mem[i] = d;
      cycle(1, 1, i != 0, i, d, 0, 0);
      #4;
    end
    // random reads
    for (int i = 0; i < 300; i++) begin
      a = $urandom % WORDS;
      cycle(1, 0, 0, a, 0, 1, ref_mem[a]);
      #4;
    end
    // sequential read bursts
    for (int b = 0; b < 20; b++) begin
      a = $urandom % WORDS;
      for (int i = 0; i < 40; i++) begin
        cycle(1, 0, i != 0, a, 0, 1, ref_mem[(a + i) % WORDS]);
        #4;
      end
    end
    // random writes then reads
    for (int i = 0; i < 100; i++) begin
      a = $urandom % WORDS; d = rnd96(); ref_mem[a] = d;
      cycle(1, 1, 0, a, d, 0, 0);
      #4;
    end
    for (int i = 0; i < WORDS; i++) begin
      cycle(1, 0, i != 0, 0, 0, 1, ref_mem[i]);
      #4;
    end
    cycle(0, 0, 0, 0, 0, 0, 0); #4;
    cycle(0, 0, 0, 0, 0, 0, 0); #4;
    cycle(0, 0, 0, 0, 0, 0, 0); #4;
    // drowsy while idle keeps the data
    drowsy = 1;
    repeat (5) @(posedge clk);
    #4 drowsy = 0;
    @(negedge clk);
    cycle(0, 0, 0, 0, 0, 0, 0); #4;
    for (int i = 0; i < 16; i++) begin
      a = $urandom % WORDS;
      cycle(1, 0, 0, a, 0, 1, ref_mem[a]);
      #4;
    end
    repeat (3) cycle(0, 0, 0, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
