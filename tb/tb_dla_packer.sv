// tb_dla_packer: packs random element streams at every precision with and
// without random back-pressure and checks each output word against a reference
// packing, including the flushed, zero-padded partial word at the end of each
// stream. Without back-pressure it also checks one element per cycle.
// All stimulus is applied after the falling edge and the handshakes are
// evaluated a little later, so the values seen are those the design samples at
// the next rising edge.
`timescale 1ns/1ps
module tb_dla_packer;
  import dla_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  prec_e prec = PREC_6;
  logic in_valid = 0, in_ready, flush = 0, out_valid, out_ready = 0;
  logic [31:0] in_elem = 0;
  logic [95:0] out_word;
  dla_packer dut (.*);

  int checks = 0, failures = 0;
  logic [95:0] expw [$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, k, n, sent, idx, got, cyc;
    bit bp;
    logic [95:0] cur;
    logic [31:0] v;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int pi = 0; pi < 6; pi++)
      for (int mode = 0; mode < 2; mode++) begin
        prec = prec_e'(pi); p = prec_bits(prec); k = 96 / p;
        bp = mode == 0;
        n = 7 * k + 1 + $urandom % (k - 1);   // ends with a partial word
        expw.delete(); cur = '0; idx = 0; sent = 0; got = 0; cyc = 0;
        v = $urandom;
        while (sent < n || idx != 0 || out_valid || expw.size() != 0) begin
          @(negedge clk);
          in_valid  = sent < n;
          in_elem   = v;
          flush     = sent == n;
          out_ready = bp ? 1'($urandom % 3 != 0) : 1'b1;
          #1;
          if (sent < n) cyc++;
          // consume
          if (out_valid && out_ready) begin
            checks++;
            if (expw.size() == 0 || out_word !== expw[0]) begin
              failures++;
              if (failures < 6) $display("FAIL: prec %0d word %0d %h", p, got, out_word);
            end
            if (expw.size() != 0) void'(expw.pop_front());
            got++;
          end
          // produce
          if (in_valid && in_ready) begin
            cur |= 96'(v & ((32'd1 << p) - 1)) << (idx * p);
            idx++; sent++;
            if (idx == k) begin expw.push_back(cur); cur = '0; idx = 0; end
            v = $urandom;
          end else if (flush && dut.close) begin
            expw.push_back(cur); cur = '0; idx = 0;
          end
        end
        @(negedge clk);
        flush = 0; in_valid = 0;
        checks++;
        if (got != (n + k - 1) / k) begin failures++; $display("FAIL: prec %0d: %0d words", p, got); end
        if (!bp) begin
          checks++;
          if (cyc != n) begin failures++; $display("FAIL: prec %0d: %0d cycles for %0d elements", p, cyc, n); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
