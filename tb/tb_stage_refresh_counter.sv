// tb_stage_refresh_counter: drives "advance" with random gaps over a
// reference 8-address space (the test keeps its own up/down address
// counter and feeds col_last/row_last from it) and checks stage, pattern,
// direction, address reload and run_last against the march definition:
// stages 0..3 with stage 2 downwards, then the same for the second
// background, run_last only on the very last element. Also checks the
// refresh timer (REF_INTERVAL = 10): ref_req rises every 10 active cycles,
// ref_ack clears it and counts, and the refreshed bank alternates.
module tb_stage_refresh_counter;
  import sdram_bist_pkg::*;
  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, advance = 1'b0, col_last, row_last;
  logic active = 1'b0, ref_ack = 1'b0;
  logic [1:0] stage;
  pattern_e pattern;
  logic down, addr_load, load_down, run_last, ref_req, ref_bank;
  logic [9:0] ref_count;
  int addr = 0, checks = 0, failures = 0;
  int exp_stage = 0, exp_pat = 0;

  always #5 clk = ~clk;

  stage_refresh_counter #(.REF_INTERVAL(10)) dut (.*);

  // Reference address counter (col = addr[1:0], row = addr[2]).
  assign col_last = down ? (addr % 4 == 0) : (addr % 4 == 3);
  assign row_last = down ? (addr / 4 == 0) : (addr / 4 == 1);
  always @(posedge clk) begin
    if (addr_load)    addr <= load_down ? N - 1 : 0;
    else if (advance) addr <= down ? addr - 1 : addr + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int elems;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    // March sequencing.
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    elems = 0;
    for (int p = 0; p < 2; p++)
      for (int s = 0; s < 4; s++)
        for (int a = 0; a < N; a++) begin
          repeat ($urandom % 3) @(negedge clk);
          check(stage == 2'(s) && pattern == pattern_e'(p), $sformatf("stage %0d pat %0d exp %0d %0d", stage, pattern, s, p));
          check(down == (s == 2), "direction");
          check(addr == ((s == 2) ? N - 1 - a : a), $sformatf("address %0d", addr));
          check(run_last == (p == 1 && s == 3 && a == N - 1), "run_last");
          advance = 1'b1;
          #1 check(addr_load == (a == N - 1), "reload at stage end");
          @(negedge clk); advance = 1'b0;
          elems++;
        end
    check(elems == 64, "element count");
    // Refresh timer.
    active = 1'b1;
    for (int r = 0; r < 4; r++) begin
      int wait_cyc;
      wait_cyc = 0;
      while (!ref_req) begin
        @(negedge clk);
        wait_cyc++;
      end
      check(wait_cyc == ((r == 0) ? 10 : 10 - 3), $sformatf("refresh interval %0d", wait_cyc));
      check(ref_bank == 1'(r), "refresh bank alternates");
      repeat (2) @(negedge clk);
      ref_ack = 1'b1;
      @(negedge clk); ref_ack = 1'b0;
      check(!ref_req && ref_count == 10'(r + 1), "ack clears request and counts");
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
