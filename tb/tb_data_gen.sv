// tb_data_gen: exhaustive test of the SDRAM data generator. For both
// backgrounds, both address parities and both polarities the word is
// compared with the expected checkerboard (every bit = row^col) or
// 0x5555... word, complemented for "data bar".
module tb_data_gen;
  import sdram_bist_pkg::*;
  pattern_e pattern;
  logic row_lsb, col_lsb, inv;
  logic [DQ_W-1:0] data, exp;
  int checks = 0, failures = 0;

  data_gen dut (.*);

  initial begin
    for (int i = 0; i < 16; i++) begin
      {pattern, row_lsb, col_lsb, inv} = 4'(i);
      #1;
      if (pattern == PAT_CHECKER) exp = (row_lsb ^ col_lsb) ? 64'hFFFF_FFFF_FFFF_FFFF : 64'h0;
      else                        exp = 64'h5555_5555_5555_5555;
      if (inv) exp = ~exp;
      checks++;
      if (data !== exp) begin
        failures++;
        $display("FAIL: pat %0d r %0d c %0d inv %0d -> %h", pattern, row_lsb, col_lsb, inv, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
