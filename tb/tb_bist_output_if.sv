// tb_bist_output_if: ERROR must go high on the first error and stay until
// the next test_start; after "done" REDUN must carry exactly the frame
// {result, mask, captured, bank, row, col, bit, clock} MSB first, one bit
// per cycle, with redun_en high for exactly FRAME_W cycles.
module tb_bist_output_if;
  import sdram_bist_pkg::*;
  localparam int FW = 3 + NUM_AC + 2 + 9 + 8 + 6 + 32;
  logic clk = 1'b0, rst_n = 1'b1, test_start = 0, err = 0, done = 0;
  result_e result;
  logic [NUM_AC-1:0] ac_fail_mask;
  logic captured, fail_bank;
  logic [8:0] fail_row;
  logic [7:0] fail_col;
  logic [5:0] fail_bit;
  logic [31:0] fail_clk;
  logic error, redun, redun_en, test_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_output_if dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [FW-1:0] exp, got;
    int nbits;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int t = 0; t < 4; t++) begin
      @(negedge clk) test_start = 1;
      @(negedge clk) test_start = 0;
      check(!error && !test_done, "cleared at test start");
      if (t % 2 == 1) begin
        repeat (5) @(negedge clk);
        err = 1;
        @(negedge clk) err = 0;
        check(error, "ERROR set");
      end
      repeat (10) @(negedge clk);
      check(error == (t % 2 == 1), "ERROR sticky / stays low");
      result = result_e'($urandom % 5); ac_fail_mask = 7'($urandom); captured = 1'($urandom);
      fail_bank = 1'($urandom); fail_row = 9'($urandom); fail_col = 8'($urandom);
      fail_bit = 6'($urandom); fail_clk = $urandom;
      exp = {result, ac_fail_mask, captured, fail_bank, fail_row, fail_col, fail_bit, fail_clk};
      done = 1;
      @(negedge clk) done = 0;
      result = RES_NONE; fail_clk = '0;   // inputs may change after done
      nbits = 0; got = '0;
      while (redun_en) begin
        got = {got[FW-2:0], redun};
        nbits++;
        @(negedge clk);
      end
      check(nbits == FW, $sformatf("frame length %0d", nbits));
      check(got == exp, "frame content");
      check(test_done, "test_done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
