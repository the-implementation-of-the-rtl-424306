// tb_clock_number_gen: random error pulses against a free-running clock
// count. The first error after "clear" must be captured with its clock
// number and cell address; later ones must only be counted.
module tb_clock_number_gen;
  logic clk = 1'b0, rst_n = 1'b1, clear = 0, err = 0, err_bank = 0;
  logic [8:0] err_row = 0;
  logic [7:0] err_col = 0;
  logic [5:0] err_bit = 0;
  logic [31:0] clk_count = 0, fail_clk;
  logic captured, fail_bank;
  logic [8:0] fail_row;
  logic [7:0] fail_col;
  logic [5:0] fail_bit;
  logic [15:0] err_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) clk_count <= clk_count + 1;

  clock_number_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [31:0] c0;
    logic b0;
    logic [8:0] r0;
    logic [7:0] co0;
    logic [5:0] bit0;
    int n;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int t = 0; t < 5; t++) begin
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      check(!captured && err_count == 0, "cleared");
      repeat ($urandom % 20 + 1) @(negedge clk);
      n = $urandom % 5 + 1;
      for (int i = 0; i < n; i++) begin
        err = 1; err_bank = 1'($urandom); err_row = 9'($urandom); err_col = 8'($urandom);
        err_bit = 6'($urandom);
        if (i == 0) begin
          c0 = clk_count; b0 = err_bank; r0 = err_row; co0 = err_col; bit0 = err_bit;
        end
        @(negedge clk) err = 0;
        repeat ($urandom % 3) @(negedge clk);
      end
      check(captured && fail_clk == c0 && fail_bank == b0 && fail_row == r0 &&
            fail_col == co0 && fail_bit == bit0, "first error captured");
      check(err_count == 16'(n), $sformatf("error count %0d exp %0d", err_count, n));
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
