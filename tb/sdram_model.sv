// sdram_model: behavioural model of the embedded dual-bank SDRAM, for
// testbenches only (not synthesizable).
//
// Banks a/b each hold 2**ROW_W x 2**COL_W words of 64 bits with separate
// DIN/DOUT, non-multiplexed row/column address, CAS latency CL and burst
// length 1. Commands are decoded per bank from RASB/CASB/WEB on the rising
// clock edge (ACT, READ, WRITE, PRECHARGE, AUTO REFRESH). A READ sampled at
// edge T drives DOUT after edge T+CL-1, so it can be sampled at edge T+CL.
//
// The model checks every command against its own AC limits REQ (the
// "real" silicon timing, which a testbench can make slower than the data
// sheet) and misbehaves where a limit is broken, so that timing margin
// problems turn into data errors the BIST can see:
//   ACT too early (tRP, tRC, tRRD)   -> the opened row reads back with bit 0 flipped
//   READ/WRITE too early (tRCD, tCCD, tCDL) -> that access flips bit 0
//   PRE too early (tRAS, tCDL)       -> the last accessed word loses bit 0
// A stuck-at cell can also be injected. Protocol errors (column command to a
// closed bank, ACT to an open bank, ...) are counted in proto_errs; a
// precharge of an idle bank is a legal no-op.
module sdram_model
  import sdram_bist_pkg::*;
#(
  parameter int unsigned ROW_W      = 9,
  parameter int unsigned COL_W      = 8,
  parameter int unsigned CL         = 2,
  parameter ac_timing_t  REQ        = AC_SPEC,
  parameter bit          STUCK_EN   = 1'b0,
  parameter bit          STUCK_BANK = 1'b0,
  parameter int unsigned STUCK_ROW  = 0,
  parameter int unsigned STUCK_COL  = 0,
  parameter int unsigned STUCK_BIT  = 0,
  parameter bit          STUCK_VAL  = 1'b1
) (
  input  logic            clk,
  input  sdram_in_t       in,
  output logic [DQ_W-1:0] dout
);
  localparam int unsigned WORDS = 2 ** (ROW_W + COL_W);

  logic [DQ_W-1:0] mem [NUM_BANKS][WORDS];
  logic [DQ_W-1:0] pipe [CL];

  longint cyc = 0;
  longint last_act [NUM_BANKS];
  longint last_pre [NUM_BANKS];
  longint last_wr  [NUM_BANKS];
  longint last_act_any = -1000, last_col = -1000, last_wr_any = -1000;
  bit     open_q   [NUM_BANKS];
  bit     bad_row  [NUM_BANKS];
  int     open_row [NUM_BANKS];
  int     last_idx [NUM_BANKS];

  int proto_errs = 0;
  int n_act = 0, n_rd = 0, n_wr = 0, n_pre = 0, n_ref = 0;
  int viol [NUM_AC];

  initial begin
    for (int b = 0; b < NUM_BANKS; b++) begin
      last_act[b] = -1000; last_pre[b] = -1000; last_wr[b] = -1000;
      open_q[b] = 0; bad_row[b] = 0; open_row[b] = 0; last_idx[b] = 0;
      for (int w = 0; w < WORDS; w++) mem[b][w] = '0;
    end
    for (int i = 0; i < NUM_AC; i++) viol[i] = 0;
    for (int i = 0; i < CL; i++) pipe[i] = '0;
  end

  function automatic logic [DQ_W-1:0] read_word(int b, int idx);
    logic [DQ_W-1:0] w = mem[b][idx];
    if (STUCK_EN && b == int'(STUCK_BANK) && idx == int'(STUCK_ROW * 2**COL_W + STUCK_COL))
      w[STUCK_BIT] = STUCK_VAL;
    return w;
  endfunction

  function automatic bit early(longint since, logic [TW-1:0] lim, int p);
    if (cyc - since < longint'(lim)) begin
      viol[p]++;
      return 1'b1;
    end
    return 1'b0;
  endfunction

  always @(posedge clk) begin
    logic [DQ_W-1:0] rdata;
    bit              rd_now, bad;
    int              idx;
    cyc++;
    rd_now = 0;
    rdata  = '0;
    idx    = int'(in.row[ROW_W-1:0]) * 2**COL_W + int'(in.col[COL_W-1:0]);
    for (int b = 0; b < NUM_BANKS; b++) begin
      unique case ({in.rasb[b], in.casb[b], in.web[b]})
        3'b011: begin // ACT
          n_act++;
          if (open_q[b]) proto_errs++;
          bad = early(last_pre[b], REQ.rp, AC_RP);
          bad |= early(last_act[b], REQ.rc, AC_RC);
          if (last_act_any != last_act[b]) bad |= early(last_act_any, REQ.rrd, AC_RRD);
          open_q[b] = 1; bad_row[b] = bad; open_row[b] = int'(in.row[ROW_W-1:0]);
          last_act[b] = cyc; last_act_any = cyc;
        end
        3'b101, 3'b100: begin // READ / WRITE
          if (!open_q[b] || open_row[b] != int'(in.row[ROW_W-1:0])) proto_errs++;
          bad = early(last_act[b], REQ.rcd, AC_RCD);
          bad |= early(last_col, REQ.ccd, AC_CCD);
          bad |= early(last_wr_any, REQ.cdl, AC_CDL);
          last_col = cyc; last_idx[b] = idx;
          if (in.web[b]) begin
            n_rd++;
            rd_now = 1;
            rdata  = read_word(b, idx) ^ DQ_W'(bad | bad_row[b]);
          end else begin
            n_wr++;
            mem[b][idx] = in.din ^ DQ_W'(bad | bad_row[b]);
            last_wr[b] = cyc; last_wr_any = cyc;
          end
        end
        3'b010: begin // PRECHARGE
          n_pre++;
          bad = early(last_act[b], REQ.ras, AC_RAS);
          bad |= early(last_wr[b], REQ.cdl, AC_CDL);
          if (bad) mem[b][last_idx[b]][0] = ~mem[b][last_idx[b]][0];
          open_q[b] = 0; last_pre[b] = cyc;
        end
        3'b001: begin // AUTO REFRESH
          n_ref++;
          if (open_q[b]) proto_errs++;
          void'(early(last_pre[b], REQ.rp, AC_RP));
          void'(early(last_act[b], REQ.rc, AC_RC));
          last_act[b] = cyc;
        end
        3'b111: ;
        default: proto_errs++;
      endcase
    end
    if (rd_now) pipe[0] <= rdata;
    for (int i = 1; i < CL; i++) pipe[i] <= pipe[i-1];
  end

  assign dout = pipe[CL-1];
endmodule
