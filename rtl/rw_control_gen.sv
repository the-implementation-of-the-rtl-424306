// rw_control_gen: read/write control generator (SDRAM command sequencer).
//
// Runs one march run over the banks under test and drives the per-bank
// strobes RASB/CASB/WEB, the row/column address and the write data. For
// every address (one march element) it issues
//     ACT (bank a [, bank b]) -> column op 0 (a [, b]) -> ... -> column op n-1
//     -> PRE (a [, b])
// where the column operations (READ/WRITE, data or data-bar) come from the
// present march stage. In interleave mode both banks are opened and worked
// alternately, as in the read/write timing diagram of the part; in
// bank-by-bank mode only "bank_sel" is used. Before each element a pending
// refresh request is served with an AUTO REFRESH to the requested bank.
//
// AC timing. Every command waits until all limits of the "timing" input,
// counted in cycles since the relevant earlier command, are met:
//   ACT b : tRP since PRE b, tRC since ACT/REF b, tRRD since any ACT/REF
//   RD/WR : tRCD since ACT b, tCCD since any column command, tCDL since
//           any WRITE
//   PRE b : tRAS since ACT b, tCDL since the last WRITE to b
//   REF b : tRP since PRE b, tRC since ACT/REF b
// so the BIST exercises the memory exactly at the limits it is given. The
// controller tightens or relaxes individual limits to find which AC
// parameter lacks margin.
//
// Timing of the interface: all SDRAM outputs are registered, so a command
// decided in cycle t is on the pins in cycle t+1. rd_valid/rd_exp and the
// read address are registered together with the command. "advance" pulses
// in the cycle the last PRE of an element is decided; "done" pulses
// CAS_LATENCY+2 cycles after the final PRE of the run, when the last read
// data has been compared. Command encodings are the standard SDRAM ones;
// the PRE-after-write delay (taken as tCDL) and the refresh insertion point
// are this design's choices.
// cmd.cke is always 1: the test uses neither self-refresh nor power-down,
// so the clock enable never drops.
module rw_control_gen
  import sdram_bist_pkg::*;
#(
  parameter int unsigned ROW_W       = 9,
  parameter int unsigned COL_W       = 8,
  parameter int unsigned CAS_LATENCY = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             interleave,
  input  logic             bank_sel,
  input  ac_timing_t       timing,
  input  logic [1:0]       stage,
  input  logic             run_last,
  input  logic             ref_req,
  input  logic             ref_bank,
  input  logic [ROW_W-1:0] row,
  input  logic [COL_W-1:0] col,
  input  logic [DQ_W-1:0]  wdata,
  output logic             op_inv,
  output logic             advance,
  output logic             ref_ack,
  output logic             busy,
  output logic             done,
  output sdram_in_t        cmd,
  output logic             rd_valid,
  output logic [DQ_W-1:0]  rd_exp,
  output logic             rd_bank,
  output logic [ROW_W-1:0] rd_row,
  output logic [COL_W-1:0] rd_col
);
  typedef enum logic [2:0] {S_IDLE, S_REF, S_ACT, S_COL, S_PRE, S_DRAIN} state_e;
  typedef enum logic [2:0] {C_NOP, C_ACT, C_RD, C_WR, C_PRE, C_REF} cmd_e;

  localparam logic [TW-1:0] SAT = '1;
  localparam int unsigned   DRAIN_CYC = CAS_LATENCY + 2;

  state_e        state;
  logic          j;          // bank slot inside the element (interleave)
  logic [1:0]    k;          // column operation index inside the element
  logic [2:0]    drain;
  logic          cur_bank;
  logic          slot_last;
  logic          op_wr;
  cmd_e          issue;
  logic          issue_bank;

  logic [TW-1:0] since_act [NUM_BANKS];
  logic [TW-1:0] since_pre [NUM_BANKS];
  logic [TW-1:0] since_wr  [NUM_BANKS];
  logic [TW-1:0] since_act_any, since_col, since_wr_any;

  logic act_ok, col_ok, pre_ok, ref_ok;

  assign cur_bank  = interleave ? j : bank_sel;
  assign slot_last = interleave ? j : 1'b1;
  assign op_wr     = op_is_write(stage, k);
  assign op_inv    = op_inverted(stage, k);

  assign act_ok = since_pre[cur_bank] >= timing.rp && since_act[cur_bank] >= timing.rc &&
                  since_act_any >= timing.rrd;
  assign col_ok = since_act[cur_bank] >= timing.rcd && since_col >= timing.ccd &&
                  since_wr_any >= timing.cdl;
  assign pre_ok = since_act[cur_bank] >= timing.ras && since_wr[cur_bank] >= timing.cdl;
  assign ref_ok = since_pre[ref_bank] >= timing.rp && since_act[ref_bank] >= timing.rc &&
                  since_act_any >= timing.rrd;

  // Command decision for this cycle.
  always_comb begin
    issue      = C_NOP;
    issue_bank = cur_bank;
    unique case (state)
      S_REF: if (ref_ok) begin
        issue      = C_REF;
        issue_bank = ref_bank;
      end
      S_ACT: if (!(j == 1'b0 && ref_req) && act_ok) issue = C_ACT;
      S_COL: if (col_ok) issue = op_wr ? C_WR : C_RD;
      S_PRE: if (pre_ok) issue = C_PRE;
      default: ;
    endcase
  end

  assign ref_ack = (issue == C_REF);
  assign advance = (issue == C_PRE) && slot_last;
  assign busy    = (state != S_IDLE);

  // Sequencing.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      j     <= 1'b0;
      k     <= 2'd0;
      drain <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_ACT;
          j     <= 1'b0;
          k     <= 2'd0;
        end
        S_REF: if (issue == C_REF) state <= S_ACT;
        S_ACT: begin
          if (j == 1'b0 && ref_req) state <= S_REF;
          else if (issue == C_ACT) begin
            j <= slot_last ? 1'b0 : 1'b1;
            if (slot_last) state <= S_COL;
          end
        end
        S_COL: if (issue != C_NOP) begin
          j <= slot_last ? 1'b0 : 1'b1;
          if (slot_last) begin
            if (k == stage_ops(stage) - 2'd1) begin
              k     <= 2'd0;
              state <= S_PRE;
            end else begin
              k <= k + 2'd1;
            end
          end
        end
        S_PRE: if (issue == C_PRE) begin
          j <= slot_last ? 1'b0 : 1'b1;
          if (slot_last) begin
            if (run_last) begin
              state <= S_DRAIN;
              drain <= 3'(DRAIN_CYC - 1);
            end else begin
              state <= S_ACT;
            end
          end
        end
        S_DRAIN: begin
          if (drain == '0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            drain <= drain - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Cycles-since counters for the AC limits (saturating).
  function automatic logic [TW-1:0] bump(input logic [TW-1:0] v);
    return (v == SAT) ? SAT : v + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_BANKS; b++) begin
        since_act[b] <= SAT;
        since_pre[b] <= SAT;
        since_wr[b]  <= SAT;
      end
      since_act_any <= SAT;
      since_col     <= SAT;
      since_wr_any  <= SAT;
    end else begin
      for (int b = 0; b < NUM_BANKS; b++) begin
        since_act[b] <= ((issue == C_ACT || issue == C_REF) && issue_bank == 1'(b)) ? TW'(1) : bump(since_act[b]);
        since_pre[b] <= (issue == C_PRE && issue_bank == 1'(b)) ? TW'(1) : bump(since_pre[b]);
        since_wr[b]  <= (issue == C_WR  && issue_bank == 1'(b)) ? TW'(1) : bump(since_wr[b]);
      end
      since_act_any <= (issue == C_ACT || issue == C_REF) ? TW'(1) : bump(since_act_any);
      since_col     <= (issue == C_RD || issue == C_WR) ? TW'(1) : bump(since_col);
      since_wr_any  <= (issue == C_WR) ? TW'(1) : bump(since_wr_any);
    end
  end

  // Registered SDRAM command and read tag.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd      <= SDRAM_NOP;
      rd_valid <= 1'b0;
      rd_exp   <= '0;
      rd_bank  <= 1'b0;
      rd_row   <= '0;
      rd_col   <= '0;
    end else begin
      cmd      <= SDRAM_NOP;
      cmd.row  <= 9'(row);
      cmd.col  <= 8'(col);
      cmd.din  <= wdata;
      unique case (issue)
        C_ACT: cmd.rasb[issue_bank] <= 1'b0;
        C_RD:  cmd.casb[issue_bank] <= 1'b0;
        C_WR: begin
          cmd.casb[issue_bank] <= 1'b0;
          cmd.web[issue_bank]  <= 1'b0;
        end
        C_PRE: begin
          cmd.rasb[issue_bank] <= 1'b0;
          cmd.web[issue_bank]  <= 1'b0;
        end
        C_REF: begin
          cmd.rasb[issue_bank] <= 1'b0;
          cmd.casb[issue_bank] <= 1'b0;
        end
        default: ;
      endcase
      rd_valid <= (issue == C_RD);
      rd_exp   <= wdata;
      rd_bank  <= issue_bank;
      rd_row   <= row;
      rd_col   <= col;
    end
  end
endmodule
