// tb_input_mux_array: random test of the 2x1 multiplexer array. With
// bist_mode high every SDRAM input must equal the BIST's, otherwise the
// logic's, field by field.
module tb_input_mux_array;
  import sdram_bist_pkg::*;
  logic bist_mode;
  sdram_in_t normal_in, bist_in, mem_in;
  int checks = 0, failures = 0;

  input_mux_array dut (.*);

  function automatic sdram_in_t rnd();
    return '{cke: 1'($urandom), rasb: 2'($urandom), casb: 2'($urandom), web: 2'($urandom),
             row: 9'($urandom), col: 8'($urandom), din: {$urandom, $urandom}};
  endfunction

  initial begin
    for (int i = 0; i < 200; i++) begin
      normal_in = rnd();
      bist_in   = rnd();
      bist_mode = 1'($urandom);
      #1;
      checks++;
      if (mem_in.rasb != (bist_mode ? bist_in.rasb : normal_in.rasb) ||
          mem_in.casb != (bist_mode ? bist_in.casb : normal_in.casb) ||
          mem_in.web  != (bist_mode ? bist_in.web  : normal_in.web)  ||
          mem_in.cke  != (bist_mode ? bist_in.cke  : normal_in.cke)  ||
          mem_in.row  != (bist_mode ? bist_in.row  : normal_in.row)  ||
          mem_in.col  != (bist_mode ? bist_in.col  : normal_in.col)  ||
          mem_in.din  != (bist_mode ? bist_in.din  : normal_in.din)) begin
        failures++;
        $display("FAIL: mode %0d", bist_mode);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
