// tb_pingpong_buffer: self-checking test of one double-buffered group.
// Fills bank A with a pattern, swaps, then reads bank A back while writing a
// second pattern into bank B at the same time (the producer/consumer overlap
// the buffers exist for), swaps again and reads bank B. Every read word is
// compared with the pattern written, one cycle after the read request.
`timescale 1ns/1ps
module tb_pingpong_buffer;
  import repvgg_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic swap, wr_bank, wr_en, rd_en;
  logic [5:0] wr_addr, rd_addr;
  vec_t wr_data, rd_data;
  pingpong_buffer #(.DEPTH(DEPTH)) dut (.*);
  int checks = 0, failures = 0;

  function automatic vec_t pat(int seed, int a);
    vec_t v;
    for (int c = 0; c < CH_T; c++) v[c] = data_t'(seed * 1000 + a * 8 + c);
    return v;
  endfunction

  initial begin
    swap = 0; wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1; wr_addr = 6'(a); wr_data = pat(1, a); @(negedge clk);
    end
    wr_en = 0; swap = 1; @(negedge clk); swap = 0;
    checks++;
    if (wr_bank != 1'b1) begin failures++; $display("FAIL bank select did not toggle"); end
    for (int a = 0; a <= DEPTH; a++) begin
      wr_en = (a < DEPTH); wr_addr = 6'(a); wr_data = pat(2, a);
      rd_en = (a < DEPTH); rd_addr = 6'(a);
      @(posedge clk); #1;
      if (a < DEPTH) begin
        checks++;
        if (rd_data != pat(1, a)) begin failures++; $display("FAIL bank A word %0d got %h exp %h", a, rd_data, pat(1, a)); end
      end
      @(negedge clk);
    end
    wr_en = 0; rd_en = 0; swap = 1; @(negedge clk); swap = 0;
    for (int a = 0; a <= DEPTH; a++) begin
      rd_en = (a < DEPTH); rd_addr = 6'(a);
      @(posedge clk); #1;
      if (a < DEPTH) begin
        checks++;
        if (rd_data != pat(2, a)) begin failures++; $display("FAIL bank B word %0d got %h exp %h", a, rd_data, pat(2, a)); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
