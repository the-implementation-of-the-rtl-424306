// bist_controller: BIST controller, the test flow of the self-test.
//
// Sequences complete march runs (each one: two data backgrounds x four
// stages over all addresses of the banks under test) through four phases:
//   1. interleave: both banks interleaved, data-sheet timing. Pass -> the
//      memory is good, stop.
//   2. minimum margin: bank a, then bank b, data-sheet timing. No bank
//      fails -> the failure comes from interleaved operation, stop.
//   3. maximum margin: each failing bank again with every AC limit relaxed
//      by RELAX cycles. Still failing -> the memory does not work at the
//      real operating rate, stop.
//   4. constrained: for each of the seven AC parameters in turn, each
//      failing bank at data-sheet timing except that this one parameter is
//      relaxed. A parameter whose relaxation alone makes the failure go
//      away is the one without margin. Stop after the last parameter.
//      (Tightening one parameter while relaxing the others does not work:
//      relaxed tRCD/tCDL push the precharge out so far that a tight tRAS is
//      never exercised. Hence one parameter is relaxed at a time.)
// "run_start" launches a run, "run_done" ends it; the error type analyzer
// files the run's result at run_done and this FSM branches on its flags
// the cycle after. At the end "finish" pulses (the analyzer latches the
// verdict) and "done" pulses one cycle later. "test_start" (re)starts the
// whole flow. The phases and their order follow the document's flow chart;
// the size of the relaxation and the bank iteration are this design's.
module bist_controller
  import sdram_bist_pkg::*;
#(
  parameter ac_timing_t    AC_TIGHT = AC_SPEC,
  parameter logic [TW-1:0] RELAX    = 5'd2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 test_start,
  input  logic                 run_done,
  input  logic                 il_fail,
  input  logic [NUM_BANKS-1:0] min_fail_banks,
  input  logic                 max_fail,
  output logic                 run_start,
  output phase_e               phase,
  output logic                 interleave,
  output logic                 bank_sel,
  output ac_param_e            ac_idx,
  output ac_timing_t           timing,
  output logic                 finish,
  output logic                 done,
  output logic                 busy
);
  typedef enum logic [2:0] {C_IDLE, C_LAUNCH, C_WAIT, C_DECIDE, C_FINISH, C_DONE} cstate_e;

  cstate_e    state;
  ac_timing_t relaxed;
  logic       first_fail;
  logic       more_banks;

  assign first_fail = min_fail_banks[0] ? 1'b0 : 1'b1;
  assign more_banks = (bank_sel == 1'b0) && min_fail_banks[1];

  // Timing set of the present phase.
  always_comb begin
    relaxed.rrd = AC_TIGHT.rrd + RELAX;
    relaxed.rcd = AC_TIGHT.rcd + RELAX;
    relaxed.rp  = AC_TIGHT.rp  + RELAX;
    relaxed.ras = AC_TIGHT.ras + RELAX;
    relaxed.rc  = AC_TIGHT.rc  + RELAX;
    relaxed.cdl = AC_TIGHT.cdl + RELAX;
    relaxed.ccd = AC_TIGHT.ccd + RELAX;
    unique case (phase)
      PH_INTERLEAVE, PH_MIN_MARGIN: timing = AC_TIGHT;
      PH_MAX_MARGIN:                timing = relaxed;
      PH_CONSTRAIN: begin
        timing = AC_TIGHT;
        unique case (ac_idx)
          AC_RRD: timing.rrd = relaxed.rrd;
          AC_RCD: timing.rcd = relaxed.rcd;
          AC_RP:  timing.rp  = relaxed.rp;
          AC_RAS: timing.ras = relaxed.ras;
          AC_RC:  timing.rc  = relaxed.rc;
          AC_CDL: timing.cdl = relaxed.cdl;
          default: timing.ccd = relaxed.ccd;
        endcase
      end
    endcase
  end

  assign interleave = (phase == PH_INTERLEAVE);
  assign run_start  = (state == C_LAUNCH);
  assign finish     = (state == C_FINISH);
  assign done       = (state == C_DONE);
  assign busy       = (state != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= C_IDLE;
      phase    <= PH_INTERLEAVE;
      bank_sel <= 1'b0;
      ac_idx   <= AC_RRD;
    end else if (test_start) begin
      state    <= C_LAUNCH;
      phase    <= PH_INTERLEAVE;
      bank_sel <= 1'b0;
      ac_idx   <= AC_RRD;
    end else begin
      unique case (state)
        C_IDLE:   ;
        C_LAUNCH: state <= C_WAIT;
        C_WAIT:   if (run_done) state <= C_DECIDE;
        C_DECIDE: begin
          state <= C_LAUNCH;
          unique case (phase)
            PH_INTERLEAVE:
              if (!il_fail) state <= C_FINISH;
              else begin
                phase    <= PH_MIN_MARGIN;
                bank_sel <= 1'b0;
              end
            PH_MIN_MARGIN:
              if (bank_sel == 1'b0) bank_sel <= 1'b1;
              else if (min_fail_banks == '0) state <= C_FINISH;
              else begin
                phase    <= PH_MAX_MARGIN;
                bank_sel <= first_fail;
              end
            PH_MAX_MARGIN:
              if (more_banks) bank_sel <= 1'b1;
              else if (max_fail) state <= C_FINISH;
              else begin
                phase    <= PH_CONSTRAIN;
                ac_idx   <= AC_RRD;
                bank_sel <= first_fail;
              end
            PH_CONSTRAIN:
              if (more_banks) bank_sel <= 1'b1;
              else if (ac_idx == AC_CCD) state <= C_FINISH;
              else begin
                ac_idx   <= ac_param_e'(ac_idx + 3'd1);
                bank_sel <= first_fail;
              end
          endcase
        end
        C_FINISH: state <= C_DONE;
        C_DONE:   state <= C_IDLE;
        default:  state <= C_IDLE;
      endcase
    end
  end
endmodule
