// tb_bist_clock_counter: counts with random enable, clears, and saturates
// (6-bit instance) - compared every cycle with a reference count.
module tb_bist_clock_counter;
  localparam int unsigned W = 6;
  logic clk = 1'b0, rst_n = 1'b1, clear = 1'b0, en = 1'b0;
  logic [W-1:0] count;
  int ref_cnt = 0, checks = 0, failures = 0;
  bit saw_sat = 0;

  always #5 clk = ~clk;

  bist_clock_counter #(.CNT_W(W)) dut (.*);

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      clear = (i == 150);
      en    = (i > 200) ? 1'b1 : 1'($urandom);
      @(posedge clk);
      if (clear) ref_cnt = 0;
      else if (en && ref_cnt < 2**W - 1) ref_cnt++;
      #1;
      checks++;
      if (count != W'(ref_cnt)) begin
        failures++;
        $display("FAIL: count %0d exp %0d", count, ref_cnt);
      end
      if (ref_cnt == 2**W - 1) saw_sat = 1;
    end
    checks++;
    if (!saw_sat) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
