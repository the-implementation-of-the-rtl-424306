// tb_sdram_bist_top: end-to-end test of the SDRAM BIST on a reduced
// memory (2 banks x 4 rows x 4 columns x 64 bits).
//
// Five copies of the BIST each test a behavioural SDRAM with a different
// defect, and every verdict, fail mask and fail address shifted out on
// REDUN is checked against what the defect must produce:
//   good memory              -> GOOD, ERROR low, exact run length
//   tRCD needs 4 cycles      -> AC fail, mask = tRCD only
//   tRRD needs 3 cycles      -> fails only when banks are interleaved
//   stuck-at-1 cell b1 r2 c1 bit 5 -> fails at any timing, address reported
//   tRAS needs 7 cycles      -> AC fail, mask = tRAS only
// It also checks normal mode (multiplexer passes the logic's inputs), that
// the BIST never breaks the SDRAM protocol, and that every mechanism
// (each flow phase, refresh, errors, REDUN shifting, reads, writes)
// happened at least once.
module tb_sdram_bist_top;
  import sdram_bist_pkg::*;

  localparam int unsigned RW = 2, CW = 2;
  localparam int unsigned A  = 2 ** (RW + CW);
  localparam int unsigned FW = 3 + NUM_AC + 2 + RW + CW + 6 + 32;
  localparam int NE = 5;

  localparam ac_timing_t REQ_RCD = '{rrd: 5'd2, rcd: 5'd4, rp: 5'd3, ras: 5'd6, rc: 5'd9, cdl: 5'd1, ccd: 5'd1};
  localparam ac_timing_t REQ_RRD = '{rrd: 5'd3, rcd: 5'd3, rp: 5'd3, ras: 5'd6, rc: 5'd9, cdl: 5'd1, ccd: 5'd1};
  localparam ac_timing_t REQ_RAS = '{rrd: 5'd2, rcd: 5'd3, rp: 5'd3, ras: 5'd7, rc: 5'd9, cdl: 5'd1, ccd: 5'd1};

  logic clk = 1'b0, rst_n = 1'b1, bist_on = 1'b0;
  sdram_in_t normal_in;
  sdram_in_t mem_in [NE];
  logic      error [NE], test_done [NE];
  logic [FW-1:0] frame [NE];
  int        frame_bits [NE];
  longint    first_cmd [NE], last_cmd [NE];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_env #(.ROW_W(RW), .COL_W(CW)) e0 (
    .clk, .rst_n, .bist_on, .normal_in, .mem_in(mem_in[0]), .error(error[0]),
    .test_done(test_done[0]), .frame(frame[0]), .frame_bits(frame_bits[0]),
    .first_cmd(first_cmd[0]), .last_cmd(last_cmd[0]));
  bist_env #(.ROW_W(RW), .COL_W(CW), .REF_INTERVAL(60), .REQ(REQ_RCD)) e1 (
    .clk, .rst_n, .bist_on, .normal_in, .mem_in(mem_in[1]), .error(error[1]),
    .test_done(test_done[1]), .frame(frame[1]), .frame_bits(frame_bits[1]),
    .first_cmd(first_cmd[1]), .last_cmd(last_cmd[1]));
  bist_env #(.ROW_W(RW), .COL_W(CW), .REF_INTERVAL(60), .REQ(REQ_RRD)) e2 (
    .clk, .rst_n, .bist_on, .normal_in, .mem_in(mem_in[2]), .error(error[2]),
    .test_done(test_done[2]), .frame(frame[2]), .frame_bits(frame_bits[2]),
    .first_cmd(first_cmd[2]), .last_cmd(last_cmd[2]));
  bist_env #(.ROW_W(RW), .COL_W(CW), .REF_INTERVAL(60), .STUCK_EN(1'b1), .STUCK_BANK(1'b1),
             .STUCK_ROW(2), .STUCK_COL(1), .STUCK_BIT(5)) e3 (
    .clk, .rst_n, .bist_on, .normal_in, .mem_in(mem_in[3]), .error(error[3]),
    .test_done(test_done[3]), .frame(frame[3]), .frame_bits(frame_bits[3]),
    .first_cmd(first_cmd[3]), .last_cmd(last_cmd[3]));
  bist_env #(.ROW_W(RW), .COL_W(CW), .REF_INTERVAL(60), .REQ(REQ_RAS)) e4 (
    .clk, .rst_n, .bist_on, .normal_in, .mem_in(mem_in[4]), .error(error[4]),
    .test_done(test_done[4]), .frame(frame[4]), .frame_bits(frame_bits[4]),
    .first_cmd(first_cmd[4]), .last_cmd(last_cmd[4]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters, sampled on the first copy that shows each one.
  int n_phase [4];
  int n_err = 0;
  always @(posedge clk) begin
    if (e1.dut.run_start) n_phase[e1.dut.phase]++;
    if (e2.dut.run_start) n_phase[e2.dut.phase]++;
    if (e3.dut.run_start) n_phase[e3.dut.phase]++;
    if (e1.dut.err) n_err++;
  end

  // Frame fields.
  function automatic result_e f_res(logic [FW-1:0] f);   return result_e'(f[FW-1 -: 3]); endfunction
  function automatic logic [6:0] f_mask(logic [FW-1:0] f); return f[FW-4 -: 7]; endfunction
  function automatic logic f_capt(logic [FW-1:0] f);      return f[FW-11]; endfunction
  function automatic logic f_bank(logic [FW-1:0] f);      return f[FW-12]; endfunction
  function automatic logic [RW-1:0] f_row(logic [FW-1:0] f); return f[38+CW +: RW]; endfunction
  function automatic logic [CW-1:0] f_col(logic [FW-1:0] f); return f[38 +: CW]; endfunction
  function automatic logic [5:0] f_bit(logic [FW-1:0] f); return f[32 +: 6]; endfunction
  function automatic logic [31:0] f_clk(logic [FW-1:0] f); return f[31:0]; endfunction

  initial begin
    bit all_done;
    int waited;
    for (int i = 0; i < 4; i++) n_phase[i] = 0;
    normal_in = SDRAM_NOP;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    bist_on = 1'b1;
    waited = 0;
    do begin
      @(posedge clk);
      waited++;
      all_done = 1;
      for (int e = 0; e < NE; e++) if (!test_done[e]) all_done = 0;
    end while (!all_done && waited < 400000);
    repeat (FW + 5) @(posedge clk);

    for (int e = 0; e < NE; e++) check(frame_bits[e] == FW, $sformatf("env %0d REDUN frame length %0d", e, frame_bits[e]));

    // e0: good memory.
    check(f_res(frame[0]) == RES_GOOD, "good memory -> GOOD");
    check(!error[0], "good memory -> ERROR low");
    check(!f_capt(frame[0]) && f_mask(frame[0]) == 0, "good memory -> no fail recorded");
    // Interleaved element lengths at data-sheet timing: 9/11/13/9 cycles for
    // stages with 1/2/3/1 column ops, two passes -> 84 cycles per address.
    check(last_cmd[0] - first_cmd[0] == longint'(84 * A - 1),
          $sformatf("good run length %0d, expected %0d", last_cmd[0] - first_cmd[0], 84 * A - 1));
    check(e0.u_mem.n_wr == 2 * 2 * 3 * int'(A) && e0.u_mem.n_rd == 2 * 2 * 4 * int'(A),
          $sformatf("good run: %0d writes %0d reads", e0.u_mem.n_wr, e0.u_mem.n_rd));

    // e1: tRCD lacks margin.
    check(f_res(frame[1]) == RES_AC_FAIL, "slow tRCD -> AC fail");
    check(f_mask(frame[1]) == 7'(1 << AC_RCD), $sformatf("slow tRCD mask %b", f_mask(frame[1])));
    check(error[1], "slow tRCD -> ERROR high");

    // e2: only interleaving fails.
    check(f_res(frame[2]) == RES_INTERLEAVE, $sformatf("slow tRRD -> interleave fail (got %0d)", f_res(frame[2])));

    // e3: stuck cell.
    check(f_res(frame[3]) == RES_NOT_AT_RATE, "stuck cell -> not at rate");
    check(f_capt(frame[3]) && f_bank(frame[3]) == 1'b1 && f_row(frame[3]) == 2 &&
          f_col(frame[3]) == 1 && f_bit(frame[3]) == 5,
          $sformatf("stuck cell address b%0d r%0d c%0d bit%0d", f_bank(frame[3]), f_row(frame[3]),
                    f_col(frame[3]), f_bit(frame[3])));
    check(f_clk(frame[3]) > 0 && f_clk(frame[3]) < 32'(84 * A), "stuck cell clock number in first run");

    // e4: tRAS lacks margin.
    $display("proto %0d %0d %0d %0d %0d", e0.u_mem.proto_errs, e1.u_mem.proto_errs, e2.u_mem.proto_errs, e3.u_mem.proto_errs, e4.u_mem.proto_errs);
    $display("results: %0d %0d %0d %0d %0d", f_res(frame[0]), f_res(frame[1]), f_res(frame[2]),
             f_res(frame[3]), f_res(frame[4]));
    check(f_res(frame[4]) == RES_AC_FAIL && f_mask(frame[4]) == 7'(1 << AC_RAS),
          $sformatf("slow tRAS -> mask %b", f_mask(frame[4])));

    // Protocol and mechanisms.
    check(e0.u_mem.proto_errs + e1.u_mem.proto_errs + e2.u_mem.proto_errs +
          e3.u_mem.proto_errs + e4.u_mem.proto_errs == 0, "no SDRAM protocol errors");
    check(e0.u_mem.n_ref == 0 && e1.u_mem.n_ref > 0, "refresh issued when due");
    for (int p = 0; p < 4; p++) check(n_phase[p] > 0, $sformatf("phase %0d ran", p));
    check(n_err > 0, "compare errors seen");
    // Normal mode (BIST_on low): the multiplexer array passes the logic's inputs.
    bist_on = 1'b0;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 20; i++) begin
      normal_in = '{cke: 1'($urandom), rasb: 2'($urandom), casb: 2'($urandom), web: 2'($urandom),
                    row: 9'($urandom), col: 8'($urandom), din: {$urandom, $urandom}};
      #1;
      for (int e = 0; e < NE; e++) check(mem_in[e] == normal_in, "normal mode passes logic inputs");
      @(posedge clk);
    end
    $display("mechanisms: phases %0d/%0d/%0d/%0d errors %0d refreshes %0d",
             n_phase[0], n_phase[1], n_phase[2], n_phase[3], n_err, e1.u_mem.n_ref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
