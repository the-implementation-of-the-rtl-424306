// tb_ac_param_sweep: the AC-parameter fault experiment. Seven copies of
// the BIST each test a reduced SDRAM model (2 banks x 4 rows x 4 columns)
// in which exactly one AC parameter needs one cycle more than the data
// sheet allows. Expected verdicts:
//   tRRD slow -> only interleaved operation fails (RES_INTERLEAVE)
//   any other -> RES_AC_FAIL with that parameter's bit set in the AC fail
//                mask (other bits may be set as well where relaxing a
//                neighbouring limit also hides the defect, e.g. a longer
//                tRC also delays the next ACT past a slow tRP)
// For each copy the test also checks that ERROR is high and that a fail
// address was captured.
module tb_ac_param_sweep;
  import sdram_bist_pkg::*;

  localparam int unsigned RW = 2, CW = 2;
  localparam int unsigned FW = 3 + NUM_AC + 2 + RW + CW + 6 + 32;
  localparam ac_timing_t REQ0 = '{rrd: 5'd3, rcd: 5'd3, rp: 5'd3, ras: 5'd6, rc: 5'd9, cdl: 5'd1, ccd: 5'd1};
  localparam ac_timing_t REQ1 = '{rrd: 5'd2, rcd: 5'd4, rp: 5'd3, ras: 5'd6, rc: 5'd9, cdl: 5'd1, ccd: 5'd1};
  localparam ac_timing_t REQ2 = '{rrd: 5'd2, rcd: 5'd3, rp: 5'd4, ras: 5'd6, rc: 5'd9, cdl: 5'd1, ccd: 5'd1};
  localparam ac_timing_t REQ3 = '{rrd: 5'd2, rcd: 5'd3, rp: 5'd3, ras: 5'd7, rc: 5'd9, cdl: 5'd1, ccd: 5'd1};
  localparam ac_timing_t REQ4 = '{rrd: 5'd2, rcd: 5'd3, rp: 5'd3, ras: 5'd6, rc: 5'd10, cdl: 5'd1, ccd: 5'd1};
  localparam ac_timing_t REQ5 = '{rrd: 5'd2, rcd: 5'd3, rp: 5'd3, ras: 5'd6, rc: 5'd9, cdl: 5'd2, ccd: 5'd1};
  localparam ac_timing_t REQ6 = '{rrd: 5'd2, rcd: 5'd3, rp: 5'd3, ras: 5'd6, rc: 5'd9, cdl: 5'd1, ccd: 5'd2};

  logic clk = 1'b0, rst_n = 1'b1, bist_on = 1'b0;
  sdram_in_t mem_in [NUM_AC];
  logic      error [NUM_AC], test_done [NUM_AC];
  logic [FW-1:0] frame [NUM_AC];
  int        frame_bits [NUM_AC];
  longint    first_cmd [NUM_AC], last_cmd [NUM_AC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  bist_env #(.ROW_W(RW), .COL_W(CW), .REF_INTERVAL(60), .REQ(REQ0)) e0 (
    .clk, .rst_n, .bist_on, .normal_in(SDRAM_NOP), .mem_in(mem_in[0]), .error(error[0]),
    .test_done(test_done[0]), .frame(frame[0]), .frame_bits(frame_bits[0]),
    .first_cmd(first_cmd[0]), .last_cmd(last_cmd[0]));
  bist_env #(.ROW_W(RW), .COL_W(CW), .REF_INTERVAL(60), .REQ(REQ1)) e1 (
    .clk, .rst_n, .bist_on, .normal_in(SDRAM_NOP), .mem_in(mem_in[1]), .error(error[1]),
    .test_done(test_done[1]), .frame(frame[1]), .frame_bits(frame_bits[1]),
    .first_cmd(first_cmd[1]), .last_cmd(last_cmd[1]));
  bist_env #(.ROW_W(RW), .COL_W(CW), .REF_INTERVAL(60), .REQ(REQ2)) e2 (
    .clk, .rst_n, .bist_on, .normal_in(SDRAM_NOP), .mem_in(mem_in[2]), .error(error[2]),
    .test_done(test_done[2]), .frame(frame[2]), .frame_bits(frame_bits[2]),
    .first_cmd(first_cmd[2]), .last_cmd(last_cmd[2]));
  bist_env #(.ROW_W(RW), .COL_W(CW), .REF_INTERVAL(60), .REQ(REQ3)) e3 (
    .clk, .rst_n, .bist_on, .normal_in(SDRAM_NOP), .mem_in(mem_in[3]), .error(error[3]),
    .test_done(test_done[3]), .frame(frame[3]), .frame_bits(frame_bits[3]),
    .first_cmd(first_cmd[3]), .last_cmd(last_cmd[3]));
  bist_env #(.ROW_W(RW), .COL_W(CW), .REF_INTERVAL(60), .REQ(REQ4)) e4 (
    .clk, .rst_n, .bist_on, .normal_in(SDRAM_NOP), .mem_in(mem_in[4]), .error(error[4]),
    .test_done(test_done[4]), .frame(frame[4]), .frame_bits(frame_bits[4]),
    .first_cmd(first_cmd[4]), .last_cmd(last_cmd[4]));
  bist_env #(.ROW_W(RW), .COL_W(CW), .REF_INTERVAL(60), .REQ(REQ5)) e5 (
    .clk, .rst_n, .bist_on, .normal_in(SDRAM_NOP), .mem_in(mem_in[5]), .error(error[5]),
    .test_done(test_done[5]), .frame(frame[5]), .frame_bits(frame_bits[5]),
    .first_cmd(first_cmd[5]), .last_cmd(last_cmd[5]));
  bist_env #(.ROW_W(RW), .COL_W(CW), .REF_INTERVAL(60), .REQ(REQ6)) e6 (
    .clk, .rst_n, .bist_on, .normal_in(SDRAM_NOP), .mem_in(mem_in[6]), .error(error[6]),
    .test_done(test_done[6]), .frame(frame[6]), .frame_bits(frame_bits[6]),
    .first_cmd(first_cmd[6]), .last_cmd(last_cmd[6]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bit all_done;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    bist_on = 1'b1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int e = 0; e < NUM_AC; e++) if (!test_done[e]) all_done = 0;
    end while (!all_done);
    repeat (FW + 5) @(posedge clk);
    for (int p = 0; p < NUM_AC; p++) begin
      automatic result_e    res  = result_e'(frame[p][FW-1 -: 3]);
      automatic logic [6:0] mask = frame[p][FW-4 -: 7];
      $display("slow parameter %0d: verdict %0d mask %b", p, res, mask);
      check(frame_bits[p] == FW, "frame shifted out");
      check(error[p] && frame[p][FW-11], "ERROR high and fail captured");
      if (p == AC_RRD) check(res == RES_INTERLEAVE, "slow tRRD -> interleave-only failure");
      else             check(res == RES_AC_FAIL && mask[p], $sformatf("slow parameter %0d flagged", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
