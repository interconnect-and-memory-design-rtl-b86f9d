// tb_dla_unpacker: streams random 96-bit words through the unpacker at every
// precision with random back-pressure on both sides and checks each element
// (position, sign extension, last flag) against a reference slicing. With
// the output always ready, checks that words are unpacked without bubbles:
// n words of k elements take n*k cycles (the ping-pong pair hides loading).
`timescale 1ns/1ps
module tb_dla_unpacker;
  import dla_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  prec_e prec = PREC_6;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_last;
  logic [95:0] in_word = 0;
  logic [31:0] out_elem;
  dla_unpacker dut (.*);

  int checks = 0, failures = 0;
  logic [95:0] words [$];
  int stall_prob;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer
  int sent, nwords;
  always @(posedge clk) begin
    if (in_valid && in_ready) sent++;
    #1;
    in_valid = (sent < nwords) && ($urandom % 100 >= stall_prob);
    if (in_valid) in_word = words[sent];
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int pi = 0; pi < 6; pi++)
      for (int mode = 0; mode < 2; mode++) begin
        int p, k, w, e, cyc, first;
        prec = prec_e'(pi); p = prec_bits(prec); k = 96 / p;
        stall_prob = mode ? 0 : 30;
        words.delete();
        for (int i = 0; i < 20; i++) words.push_back({$urandom, $urandom, $urandom});
        nwords = 20; sent = 0; w = 0; e = 0; cyc = 0; first = -1;
        while (w < 20 && cyc < 5000) begin
          out_ready = mode ? 1'b1 : 1'($urandom % 3 != 0);
          #1;
          if (out_valid && out_ready) begin
            logic [31:0] exp;
            logic [95:0] sh;
            if (first < 0) first = cyc;
            sh = words[w] >> (e * p);
            exp = 32'(signed'(sh[31:0] << (32 - p)) >>> (32 - p));
            checks++;
            if (out_elem !== exp || out_last !== (e == k - 1)) begin
              failures++;
              if (failures < 6) $display("FAIL: prec %0d word %0d elem %0d: %h exp %h", p, w, e, out_elem, exp);
            end
            e++;
            if (e == k) begin e = 0; w++; end
          end
          @(posedge clk); #1;
          cyc++;
        end
        if (mode) begin
          checks++;
          if (cyc - first != 20 * k) begin failures++; $display("FAIL: prec %0d: %0d cycles for %0d elements", p, cyc - first, 20 * k); end
        end
        out_ready = 0;
        repeat (3) @(posedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
