// tb_shortcut_add: self-checking test of the branch addition. Random Q8.8
// operands with all branch-enable patterns, including values that saturate;
// each result is compared with a saturating integer sum one cycle later.
`timescale 1ns/1ps
module tb_shortcut_add;
  import repvgg_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [2:0] br_en;
  vec_t br3, br1, brid, out_data;
  shortcut_add dut (.*);
  int checks = 0, failures = 0;

  initial begin
    int exp_v [CH_T];
    in_valid = 0; br_en = 0; br3 = '0; br1 = '0; brid = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      in_valid = 1;
      br_en = 3'($urandom_range(0, 7));
      for (int c = 0; c < CH_T; c++) begin
        int s;
        br3[c]  = data_t'($urandom);
        br1[c]  = data_t'(t < 100 ? int'($urandom_range(0, 2047)) - 1024 : int'($urandom));
        brid[c] = data_t'(t < 100 ? int'($urandom_range(0, 2047)) - 1024 : int'($urandom));
        if (t < 100) br3[c] = data_t'(int'($urandom_range(0, 2047)) - 1024);
        s = (br_en[0] ? int'(br3[c]) : 0) + (br_en[1] ? int'(br1[c]) : 0) + (br_en[2] ? int'(brid[c]) : 0);
        exp_v[c] = s > 32767 ? 32767 : (s < -32768 ? -32768 : s);
      end
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no valid"); end
      for (int c = 0; c < CH_T; c++)
        if (int'(out_data[c]) != exp_v[c]) begin
          failures++; $display("FAIL t%0d ch%0d got %0d exp %0d", t, c, out_data[c], exp_v[c]); break;
        end
    end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid without input"); end
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
