// tb_error_type_analyzer: plays the four test-flow outcomes through the
// analyzer and checks the flags it keeps and the verdict it latches:
// pass in the interleave phase -> GOOD; fails only interleaved ->
// INTERLEAVE; fails at relaxed timing -> NOT_AT_RATE; constrained runs
// where relaxing tRCD (and only tRCD) removes the failure -> AC_FAIL with
// mask = tRCD. Also checks that run_fail is sticky within a run and
// cleared by run_start, and that test_start clears everything.
module tb_error_type_analyzer;
  import sdram_bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic test_start = 0, run_start = 0, err = 0, run_end = 0, bank = 0, finish = 0;
  phase_e phase = PH_INTERLEAVE;
  ac_param_e ac_idx = AC_RRD;
  logic run_fail, il_fail, max_fail;
  logic [NUM_BANKS-1:0] min_fail_banks;
  logic [NUM_AC-1:0] ac_fail_mask;
  result_e result;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  error_type_analyzer dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  // One run in the given phase/bank/parameter with n_err error pulses.
  task automatic run(input phase_e ph, input logic b, input ac_param_e p, input int n_err);
    phase = ph; bank = b; ac_idx = p;
    pulse(run_start);
    check(!run_fail, "run_fail cleared at run start");
    for (int i = 0; i < n_err; i++) begin
      repeat (2) @(negedge clk);
      pulse(err);
      check(run_fail, "run_fail set by error");
    end
    repeat (3) @(negedge clk);
    check(run_fail == (n_err > 0), "run_fail sticky");
    pulse(run_end);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    // GOOD
    pulse(test_start);
    run(PH_INTERLEAVE, 0, AC_RRD, 0);
    check(!il_fail, "il pass");
    pulse(finish);
    check(result == RES_GOOD && ac_fail_mask == 0, "GOOD verdict");
    // INTERLEAVE
    pulse(test_start);
    check(result == RES_NONE, "cleared by test_start");
    run(PH_INTERLEAVE, 0, AC_RRD, 3);
    check(il_fail, "il fail flagged");
    run(PH_MIN_MARGIN, 0, AC_RRD, 0);
    run(PH_MIN_MARGIN, 1, AC_RRD, 0);
    check(min_fail_banks == 2'b00, "no bank fails");
    pulse(finish);
    check(result == RES_INTERLEAVE, "INTERLEAVE verdict");
    // NOT_AT_RATE
    pulse(test_start);
    check(!il_fail && min_fail_banks == 0, "flags cleared");
    run(PH_INTERLEAVE, 0, AC_RRD, 1);
    run(PH_MIN_MARGIN, 0, AC_RRD, 0);
    run(PH_MIN_MARGIN, 1, AC_RRD, 2);
    check(min_fail_banks == 2'b10, "bank b fails");
    run(PH_MAX_MARGIN, 1, AC_RRD, 1);
    check(max_fail, "max margin fail");
    pulse(finish);
    check(result == RES_NOT_AT_RATE, "NOT_AT_RATE verdict");
    // AC_FAIL, tRCD guilty, both banks failing
    pulse(test_start);
    run(PH_INTERLEAVE, 0, AC_RRD, 1);
    run(PH_MIN_MARGIN, 0, AC_RRD, 1);
    run(PH_MIN_MARGIN, 1, AC_RRD, 1);
    check(min_fail_banks == 2'b11, "both banks fail");
    run(PH_MAX_MARGIN, 0, AC_RRD, 0);
    run(PH_MAX_MARGIN, 1, AC_RRD, 0);
    check(!max_fail, "max margin pass");
    for (int p = 0; p < NUM_AC; p++) begin
      run(PH_CONSTRAIN, 0, ac_param_e'(p), (p == AC_RCD) ? 0 : 1);
      run(PH_CONSTRAIN, 1, ac_param_e'(p), (p == AC_RCD) ? 0 : 2);
    end
    check(ac_fail_mask == 0, "mask only at finish");
    pulse(finish);
    check(result == RES_AC_FAIL, "AC_FAIL verdict");
    check(ac_fail_mask == 7'(1 << AC_RCD), $sformatf("mask %b", ac_fail_mask));
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
