// sdram_bist_top: built-in self-test for the AC parameters of an embedded
// dual-bank 16 Mbit SDRAM (2 banks x 512 rows x 256 columns x 64 bits).
//
// The BIST sits between the surrounding logic and the SDRAM macro. With
// BIST_on low the 2x1 multiplexer array passes the logic's SDRAM inputs
// through unchanged. Raising BIST_on starts the self-test on TCLKT, the
// clock the SDRAM runs on: the BIST controller runs the march test first
// with both banks interleaved, then bank by bank at data-sheet timing, at
// relaxed timing, and finally with one AC parameter at a time at its
// data-sheet value, so that a failure is traced to the AC parameter that
// has no margin. Every read is compared with the expected data; the first
// failing cell (bank, row, column, bit) and the clock number at which it
// failed are kept. ERROR goes high on the first failure, and when the test
// ends the verdict, the AC fail mask and the fail information are shifted
// out on REDUN (frame layout in bist_output_if).
//
// Ports: mem_in/mem_dout go to/from the SDRAM macro; normal_in is the
// logic's own SDRAM request. All BIST outputs to the SDRAM are registered
// on TCLKT. ROW_W/COL_W can be reduced for simulation; the SDRAM address
// fields stay 9/8 bits wide and the unused upper bits are zero.
// A few status outputs of the sub-blocks (run_fail, ref_count, seq_busy,
// cmp_valid, err_count) are left unconnected here on purpose: the verdict,
// the first fail and the clock number already carry what the pins report,
// and the signals stay available for debug in simulation.
module sdram_bist_top
  import sdram_bist_pkg::*;
#(
  parameter int unsigned   ROW_W        = 9,
  parameter int unsigned   COL_W        = 8,
  parameter int unsigned   CAS_LATENCY  = 2,
  parameter int unsigned   REF_INTERVAL = 1562,
  parameter int unsigned   CNT_W        = 32,
  parameter ac_timing_t    AC_TIGHT     = AC_SPEC,
  parameter logic [TW-1:0] RELAX        = 5'd2
) (
  input  logic            tclk,
  input  logic            rst_n,
  input  logic            bist_on,
  input  sdram_in_t       normal_in,
  output sdram_in_t       mem_in,
  input  logic [DQ_W-1:0] mem_dout,
  output logic            error,
  output logic            redun,
  output logic            redun_en,
  output logic            test_done
);
  // Mode and start.
  logic bist_en, test_start;
  bist_clock_gen u_clkgen (.tclk, .rst_n, .bist_on, .bist_en, .bist_start(test_start));

  // Flow control.
  logic                 run_start, run_done, finish, ctl_done, ctl_busy;
  phase_e               phase;
  logic                 interleave, bank_sel;
  ac_param_e            ac_idx;
  ac_timing_t           timing;
  logic                 run_fail, il_fail, max_fail;
  logic [NUM_BANKS-1:0] min_fail_banks;
  logic [NUM_AC-1:0]    ac_fail_mask;
  result_e              result;

  bist_controller #(.AC_TIGHT(AC_TIGHT), .RELAX(RELAX)) u_ctrl (
    .clk(tclk), .rst_n, .test_start, .run_done, .il_fail, .min_fail_banks, .max_fail,
    .run_start, .phase, .interleave, .bank_sel, .ac_idx, .timing, .finish,
    .done(ctl_done), .busy(ctl_busy));

  // Address, stage and refresh.
  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;
  logic             row_last, col_last, addr_load, load_down, down, advance;
  logic [1:0]       stage;
  pattern_e         pattern;
  logic             run_last, ref_req, ref_ack, ref_bank;
  logic [9:0]       ref_count;

  stage_refresh_counter #(.REF_INTERVAL(REF_INTERVAL)) u_stage (
    .clk(tclk), .rst_n, .start(run_start), .advance, .col_last, .row_last,
    .active(ctl_busy), .ref_ack, .stage, .pattern, .down, .addr_load, .load_down,
    .run_last, .ref_req, .ref_bank, .ref_count);

  col_addr_gen #(.COL_W(COL_W)) u_col (
    .clk(tclk), .rst_n, .load(addr_load), .load_down, .step(advance), .down,
    .col, .last(col_last));

  row_addr_gen #(.ROW_W(ROW_W)) u_row (
    .clk(tclk), .rst_n, .load(addr_load), .load_down, .step(advance & col_last), .down,
    .row, .last(row_last));

  // Data and commands.
  logic            op_inv, seq_busy;
  logic [DQ_W-1:0] wdata;
  sdram_in_t       bist_cmd;
  logic            rd_valid, rd_bank;
  logic [DQ_W-1:0] rd_exp;
  logic [ROW_W-1:0] rd_row;
  logic [COL_W-1:0] rd_col;

  data_gen u_data (.pattern, .row_lsb(row[0]), .col_lsb(col[0]), .inv(op_inv), .data(wdata));

  rw_control_gen #(.ROW_W(ROW_W), .COL_W(COL_W), .CAS_LATENCY(CAS_LATENCY)) u_rw (
    .clk(tclk), .rst_n, .start(run_start), .interleave, .bank_sel, .timing, .stage,
    .run_last, .ref_req, .ref_bank, .row, .col, .wdata, .op_inv, .advance, .ref_ack,
    .busy(seq_busy), .done(run_done), .cmd(bist_cmd), .rd_valid, .rd_exp, .rd_bank,
    .rd_row, .rd_col);

  input_mux_array u_mux (.bist_mode(bist_en), .normal_in, .bist_in(bist_cmd), .mem_in);

  // Compare, analyse, record.
  logic             cmp_valid, err, err_bank;
  logic [ROW_W-1:0] err_row;
  logic [COL_W-1:0] err_col;
  logic [5:0]       err_bit;

  dout_comparator #(.CAS_LATENCY(CAS_LATENCY), .ROW_W(ROW_W), .COL_W(COL_W)) u_cmp (
    .clk(tclk), .rst_n, .rd_valid, .rd_exp, .rd_bank, .rd_row, .rd_col, .dout(mem_dout),
    .cmp_valid, .err, .err_bank, .err_row, .err_col, .err_bit);

  error_type_analyzer u_eta (
    .clk(tclk), .rst_n, .test_start, .run_start, .err, .run_end(run_done), .phase,
    .bank(bank_sel), .ac_idx, .finish, .run_fail, .il_fail, .min_fail_banks, .max_fail,
    .ac_fail_mask, .result);

  logic [CNT_W-1:0] clk_count, fail_clk;
  logic             captured, fail_bank;
  logic [ROW_W-1:0] fail_row;
  logic [COL_W-1:0] fail_col;
  logic [5:0]       fail_bit;
  logic [15:0]      err_count;

  bist_clock_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk(tclk), .rst_n, .clear(test_start), .en(ctl_busy), .count(clk_count));

  clock_number_gen #(.ROW_W(ROW_W), .COL_W(COL_W), .CNT_W(CNT_W)) u_clknum (
    .clk(tclk), .rst_n, .clear(test_start), .err, .err_bank, .err_row, .err_col, .err_bit,
    .clk_count, .captured, .fail_clk, .fail_bank, .fail_row, .fail_col, .fail_bit, .err_count);

  bist_output_if #(.ROW_W(ROW_W), .COL_W(COL_W), .CNT_W(CNT_W)) u_out (
    .clk(tclk), .rst_n, .test_start, .err, .done(ctl_done), .result, .ac_fail_mask,
    .captured, .fail_bank, .fail_row, .fail_col, .fail_bit, .fail_clk,
    .error, .redun, .redun_en, .test_done);
endmodule
