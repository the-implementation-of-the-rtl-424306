// tb_bist_controller: the test plays a memory and the error type analyzer.
// Each run the controller launches is answered after a random delay with
// run_done; whether the run "failed" follows from the timing set, the mode
// and the bank the controller chose, for four memories:
//   0 good                              -> 1 run  (interleave)
//   1 fails only interleaved            -> 3 runs (interleave, bank a, bank b)
//   2 bank a fails at any timing        -> 4 runs (..., relaxed bank a)
//   3 bank b needs tRCD >= 4 cycles     -> 11 runs (..., relaxed b, 7 constrained b)
// The whole list of runs (phase, mode, bank, parameter, timing set) is
// compared with the list the flow chart predicts, then finish/done.
module tb_bist_controller;
  import sdram_bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, test_start = 0, run_done = 0;
  logic il_fail = 0, max_fail = 0;
  logic [NUM_BANKS-1:0] min_fail_banks = '0;
  logic run_start, interleave, bank_sel, finish, done, busy;
  phase_e phase;
  ac_param_e ac_idx;
  ac_timing_t timing;
  int checks = 0, failures = 0;
  int mem_kind = 0;

  typedef struct { phase_e ph; bit il; bit b; int p; ac_timing_t t; } run_t;
  run_t exp_q[$];
  int n_runs = 0, n_finish = 0, n_done = 0;

  always #5 clk = ~clk;

  bist_controller dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic ac_timing_t relaxed_t();
    ac_timing_t t = AC_SPEC;
    t.rrd += 2; t.rcd += 2; t.rp += 2; t.ras += 2; t.rc += 2; t.cdl += 2; t.ccd += 2;
    return t;
  endfunction

  function automatic ac_timing_t one_relaxed(int p);
    ac_timing_t t = AC_SPEC, r = relaxed_t();
    case (p)
      0: t.rrd = r.rrd; 1: t.rcd = r.rcd; 2: t.rp = r.rp; 3: t.ras = r.ras;
      4: t.rc = r.rc; 5: t.cdl = r.cdl; default: t.ccd = r.ccd;
    endcase
    return t;
  endfunction

  function automatic bit mem_fails(ac_timing_t t, bit il, bit b);
    case (mem_kind)
      1: return il;
      2: return b == 1'b0;
      3: return (il || b == 1'b1) && t.rcd < 4;
      default: return 1'b0;
    endcase
  endfunction

  // Responder: answers each run and files its result like the analyzer.
  always @(posedge clk) begin
    if (run_start) begin
      automatic run_t e;
      n_runs++;
      check(exp_q.size() > 0, "unexpected extra run");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        check(phase == e.ph && interleave == e.il && (e.il || bank_sel == e.b) &&
              (e.ph != PH_CONSTRAIN || int'(ac_idx) == e.p) && timing == e.t,
              $sformatf("run %0d: phase %0d il %0d bank %0d p %0d", n_runs, phase, interleave, bank_sel, ac_idx));
      end
      fork
        begin
          automatic bit     f;
          automatic phase_e ph = phase;
          automatic bit     b  = bank_sel;
          f = mem_fails(timing, interleave, bank_sel);
          repeat ($urandom % 20 + 2) @(posedge clk);
          run_done <= 1'b1;
          @(posedge clk);
          run_done <= 1'b0;
          case (ph)
            PH_INTERLEAVE: il_fail <= f;
            PH_MIN_MARGIN: min_fail_banks[b] <= f;
            PH_MAX_MARGIN: max_fail <= max_fail | f;
            default: ;
          endcase
        end
      join_none
    end
    if (finish) n_finish++;
    if (done) n_done++;
  end

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int m = 0; m < 4; m++) begin
      mem_kind = m;
      exp_q.delete();
      exp_q.push_back('{PH_INTERLEAVE, 1, 0, 0, AC_SPEC});
      if (m >= 1) begin
        exp_q.push_back('{PH_MIN_MARGIN, 0, 0, 0, AC_SPEC});
        exp_q.push_back('{PH_MIN_MARGIN, 0, 1, 0, AC_SPEC});
      end
      if (m == 2) exp_q.push_back('{PH_MAX_MARGIN, 0, 0, 0, relaxed_t()});
      if (m == 3) begin
        exp_q.push_back('{PH_MAX_MARGIN, 0, 1, 0, relaxed_t()});
        for (int p = 0; p < NUM_AC; p++) exp_q.push_back('{PH_CONSTRAIN, 0, 1, p, one_relaxed(p)});
      end
      n_runs = 0; n_finish = 0; n_done = 0;
      il_fail = 0; max_fail = 0; min_fail_banks = '0;
      @(negedge clk) test_start = 1;
      @(negedge clk) test_start = 0;
      check(busy, "busy after start");
      wait (done);
      @(posedge clk);
      @(negedge clk);
      check(exp_q.size() == 0, $sformatf("memory %0d: %0d runs missing", m, exp_q.size()));
      check(n_finish == 1 && n_done == 1 && !busy, "one finish, one done, idle");
      check(phase == ((m == 0) ? PH_INTERLEAVE : (m == 1) ? PH_MIN_MARGIN :
                      (m == 2) ? PH_MAX_MARGIN : PH_CONSTRAIN), "stopping phase");
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
