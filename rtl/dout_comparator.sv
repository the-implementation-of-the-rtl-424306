// dout_comparator: expected/real DOUT comparator.
//
// The read/write control generator presents, in the same cycle as a READ
// command leaves the BIST, the word it expects back and the address read.
// The SDRAM has CAS latency 2: its DOUT carries that word CAS_LATENCY
// cycles later. This block delays the expectation by CAS_LATENCY register
// stages and compares it with DOUT bit for bit. On a mismatch "err" pulses
// for one cycle (one cycle after the compare), together with the failing
// bank, row and column and the lowest failing bit position.
// Interface timing: rd_valid in cycle t -> DOUT compared in cycle
// t+CAS_LATENCY -> err in cycle t+CAS_LATENCY+1.
// The compare of expected with real DOUT is the document's; the latency
// pipeline and the lowest-failing-bit report are this design's.
module dout_comparator
  import sdram_bist_pkg::*;
#(
  parameter int unsigned CAS_LATENCY = 2,
  parameter int unsigned ROW_W       = 9,
  parameter int unsigned COL_W       = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_valid,
  input  logic [DQ_W-1:0]  rd_exp,
  input  logic             rd_bank,
  input  logic [ROW_W-1:0] rd_row,
  input  logic [COL_W-1:0] rd_col,
  input  logic [DQ_W-1:0]  dout,
  output logic             cmp_valid,   // a compare happened (registered)
  output logic             err,
  output logic             err_bank,
  output logic [ROW_W-1:0] err_row,
  output logic [COL_W-1:0] err_col,
  output logic [5:0]       err_bit
);
  typedef struct packed {
    logic             valid;
    logic [DQ_W-1:0]  exp;
    logic             bank;
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
  } rd_tag_t;

  rd_tag_t          pipe [CAS_LATENCY];
  rd_tag_t          cur;
  logic [DQ_W-1:0]  diff;
  logic [5:0]       low_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CAS_LATENCY; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= '{valid: rd_valid, exp: rd_exp, bank: rd_bank, row: rd_row, col: rd_col};
      for (int i = 1; i < CAS_LATENCY; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign cur  = pipe[CAS_LATENCY-1];
  assign diff = cur.exp ^ dout;

  always_comb begin
    low_bit = '0;
    for (int i = DQ_W - 1; i >= 0; i--)
      if (diff[i]) low_bit = 6'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmp_valid <= 1'b0;
      err       <= 1'b0;
      err_bank  <= 1'b0;
      err_row   <= '0;
      err_col   <= '0;
      err_bit   <= '0;
    end else begin
      cmp_valid <= cur.valid;
      err       <= cur.valid && (diff != '0);
      err_bank  <= cur.bank;
      err_row   <= cur.row;
      err_col   <= cur.col;
      err_bit   <= low_bit;
    end
  end
endmodule
