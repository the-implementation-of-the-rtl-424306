// error_type_analyzer: turns compare errors into the test verdict.
//
// During each march run the comparator's error pulses are collected in a
// sticky "run_fail" flag (cleared by run_start). At run_end the flag is
// filed according to the phase of the test flow that ran:
//   interleave phase  -> il_fail           (did the memory fail at all?)
//   minimum margin    -> min_fail_banks[b] (which bank fails at data-sheet timing)
//   maximum margin    -> max_fail          (does it fail even with relaxed timing?)
//   constrained       -> constr_fail[p]    (still fails with only parameter p relaxed)
// The controller branches on these flags. When it pulses "finish" the
// verdict is derived from the phase in which the flow stopped: the
// interleave phase stops only on a pass (good memory), the minimum-margin
// phase only on a pass (failure due to interleaving), the maximum-margin
// phase only on a fail (not working at the real rate), and the constrained
// phase always ends with the AC fail mask naming the guilty parameters:
// ac_fail_mask = ~constr_fail, i.e. every parameter whose relaxation alone
// removed the failure. An all-zero mask with RES_AC_FAIL means no single
// parameter explains the failure (several lack margin together).
// All outputs are registered; test_start clears everything.
module error_type_analyzer
  import sdram_bist_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 test_start,
  input  logic                 run_start,
  input  logic                 err,
  input  logic                 run_end,
  input  phase_e               phase,
  input  logic                 bank,
  input  ac_param_e            ac_idx,
  input  logic                 finish,
  output logic                 run_fail,
  output logic                 il_fail,
  output logic [NUM_BANKS-1:0] min_fail_banks,
  output logic                 max_fail,
  output logic [NUM_AC-1:0]    ac_fail_mask,
  output result_e              result
);
  logic [NUM_AC-1:0] constr_fail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_fail       <= 1'b0;
      il_fail        <= 1'b0;
      min_fail_banks <= '0;
      max_fail       <= 1'b0;
      ac_fail_mask   <= '0;
      constr_fail    <= '0;
      result         <= RES_NONE;
    end else if (test_start) begin
      run_fail       <= 1'b0;
      il_fail        <= 1'b0;
      min_fail_banks <= '0;
      max_fail       <= 1'b0;
      ac_fail_mask   <= '0;
      constr_fail    <= '0;
      result         <= RES_NONE;
    end else begin
      if (run_start)  run_fail <= 1'b0;
      else if (err)   run_fail <= 1'b1;
      if (run_end) begin
        unique case (phase)
          PH_INTERLEAVE: il_fail              <= run_fail;
          PH_MIN_MARGIN: min_fail_banks[bank] <= run_fail;
          PH_MAX_MARGIN: max_fail             <= max_fail | run_fail;
          PH_CONSTRAIN:  constr_fail[ac_idx]  <= constr_fail[ac_idx] | run_fail;
        endcase
      end
      if (finish) begin
        unique case (phase)
          PH_INTERLEAVE: result <= RES_GOOD;
          PH_MIN_MARGIN: result <= RES_INTERLEAVE;
          PH_MAX_MARGIN: result <= RES_NOT_AT_RATE;
          PH_CONSTRAIN: begin
            result       <= RES_AC_FAIL;
            ac_fail_mask <= ~constr_fail;
          end
        endcase
      end
    end
  end
endmodule
