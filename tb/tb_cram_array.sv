// tb_cram_array: checks both access directions of the transposable array
// against a bit-exact model: random 32-bit word writes and reads through the
// conventional port, random column (compute word-line) writes with random
// per-row enables, and column reads of two random columns, all interleaved.
`timescale 1ns/1ps
module tb_cram_array;
  localparam int ROWS = 128, COLS = 256;
  logic clk = 0;
  always #5 clk = ~clk;

  logic row_en = 0, row_we = 0;
  logic [6:0] row_addr = 0;
  logic [2:0] word_sel = 0;
  logic [31:0] row_wdata = 0, row_rdata;
  logic [7:0] col_ra = 0, col_rb = 0, col_rd = 0;
  logic [ROWS-1:0] col_a, col_b, col_we = 0, col_wdata = 0;

  cram_array dut (.*);

  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every row through the conventional port
    for (int r = 0; r < ROWS; r++)
      for (int w = 0; w < 8; w++) begin
        row_en = 1; row_we = 1; row_addr = 7'(r); word_sel = 3'(w); row_wdata = $urandom;
        model[r][w*32 +: 32] = row_wdata;
        @(posedge clk); #1;
      end
    row_en = 0; row_we = 0;
    repeat (400) begin
      case ($urandom % 3)
        0: begin  // column write
          col_rd = 8'($urandom); col_we = {$urandom, $urandom, $urandom, $urandom};
          col_wdata = {$urandom, $urandom, $urandom, $urandom};
          for (int r = 0; r < ROWS; r++) if (col_we[r]) model[r][col_rd] = col_wdata[r];
          @(posedge clk); #1; col_we = 0;
        end
        1: begin  // word read
          row_en = 1; row_addr = 7'($urandom); word_sel = 3'($urandom);
          @(posedge clk); #1; row_en = 0;
          check(row_rdata == model[row_addr][word_sel*32 +: 32], "word read");
        end
        default: begin  // column read
          logic [ROWS-1:0] ea, eb;
          col_ra = 8'($urandom); col_rb = 8'($urandom);
          #1;
          for (int r = 0; r < ROWS; r++) begin ea[r] = model[r][col_ra]; eb[r] = model[r][col_rb]; end
          check(col_a == ea && col_b == eb, $sformatf("column read %0d/%0d", col_ra, col_rb));
          @(posedge clk); #1;
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
