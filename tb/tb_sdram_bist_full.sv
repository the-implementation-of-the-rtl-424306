// tb_sdram_bist_full: one complete self-test of a fault-free SDRAM at full
// size (2 banks x 512 rows x 256 columns x 64 bits), with every BIST
// parameter at its default: 100 MHz data-sheet timing, refresh every 1562
// cycles. Checks the verdict (GOOD, ERROR low), that the BIST obeys the
// SDRAM protocol, the number of reads and writes of the 2 x 7N march
// (N = 262,144 words), that refresh keeps pace with 1024 refreshes per
// 16 ms, and that the test takes at most 200 ms at 100 MHz (20 M cycles).
// The march alone needs 84 cycles per address pair of the two banks,
// 11,010,048 cycles; refreshes may only add to that.
module tb_sdram_bist_full;
  import sdram_bist_pkg::*;

  localparam longint A = 512 * 256;   // words per bank

  logic            clk = 1'b0, rst_n = 1'b1, bist_on = 1'b0;
  sdram_in_t       mem_in;
  logic [DQ_W-1:0] mem_dout;
  logic            error, redun, redun_en, test_done;
  longint          cyc = 0, first_cmd = -1, last_cmd = -1;
  int              checks = 0, failures = 0;

  always #5 clk = ~clk;

  sdram_bist_top dut (.tclk(clk), .rst_n, .bist_on, .normal_in(SDRAM_NOP), .mem_in, .mem_dout,
                      .error, .redun, .redun_en, .test_done);

  sdram_model u_mem (.clk, .in(mem_in), .dout(mem_dout));

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bist_on && (mem_in.rasb != '1 || mem_in.casb != '1)) begin
      if (first_cmd < 0) first_cmd <= cyc;
      last_cmd <= cyc;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    longint span;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n   = 1'b1;
    bist_on = 1'b1;
    wait (test_done);
    repeat (100) @(posedge clk);
    span = last_cmd - first_cmd;
    $display("span %0d cycles, %0d refreshes, %0d reads, %0d writes", span, u_mem.n_ref,
             u_mem.n_rd, u_mem.n_wr);
    check(dut.result == RES_GOOD, "verdict GOOD");
    check(!error, "ERROR low");
    check(u_mem.proto_errs == 0, "no protocol errors");
    check(longint'(u_mem.n_wr) == 2 * 2 * 3 * A, "writes = 2 banks x 2 passes x 3N");
    check(longint'(u_mem.n_rd) == 2 * 2 * 4 * A, "reads = 2 banks x 2 passes x 4N");
    check(span >= 84 * A - 1, "run no shorter than the march");
    check(span <= 20_000_000, "test time within 200 ms at 100 MHz");
    // One refresh per 1562 cycles; at most one may be pending at the end.
    check(longint'(u_mem.n_ref) >= span / 1562 - 1 && longint'(u_mem.n_ref) <= span / 1562 + 1,
          "refresh rate 1024 per 16 ms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
