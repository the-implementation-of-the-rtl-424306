// bist_env: test harness pairing the SDRAM BIST top with the behavioural
// SDRAM model. It drives BIST_on, captures the serial REDUN frame into
// "frame" and measures, in TCLKT cycles, the span from the first to the
// last command the BIST issues ("first_cmd", "last_cmd"). REQ sets the AC
// timing the modelled memory really needs; STUCK_* injects a stuck cell.
module bist_env
  import sdram_bist_pkg::*;
#(
  parameter int unsigned ROW_W        = 2,
  parameter int unsigned COL_W        = 2,
  parameter int unsigned REF_INTERVAL = 100000,
  parameter ac_timing_t  REQ          = AC_SPEC,
  parameter bit          STUCK_EN     = 1'b0,
  parameter bit          STUCK_BANK   = 1'b0,
  parameter int unsigned STUCK_ROW    = 0,
  parameter int unsigned STUCK_COL    = 0,
  parameter int unsigned STUCK_BIT    = 0,
  localparam int unsigned FRAME_W     = 3 + NUM_AC + 2 + ROW_W + COL_W + 6 + 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               bist_on,
  input  sdram_in_t          normal_in,
  output sdram_in_t          mem_in,
  output logic               error,
  output logic               test_done,
  output logic [FRAME_W-1:0] frame,
  output int                 frame_bits,
  output longint             first_cmd,
  output longint             last_cmd
);
  logic [DQ_W-1:0] mem_dout;
  logic            redun, redun_en;
  longint          cyc;

  sdram_bist_top #(.ROW_W(ROW_W), .COL_W(COL_W), .REF_INTERVAL(REF_INTERVAL)) dut (
    .tclk(clk), .rst_n, .bist_on, .normal_in, .mem_in, .mem_dout,
    .error, .redun, .redun_en, .test_done);

  sdram_model #(.ROW_W(ROW_W), .COL_W(COL_W), .REQ(REQ), .STUCK_EN(STUCK_EN),
                .STUCK_BANK(STUCK_BANK), .STUCK_ROW(STUCK_ROW), .STUCK_COL(STUCK_COL),
                .STUCK_BIT(STUCK_BIT)) u_mem (
    .clk, .in(mem_in), .dout(mem_dout));

  initial begin
    cyc = 0; first_cmd = -1; last_cmd = -1; frame = '0; frame_bits = 0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bist_on && (mem_in.rasb != '1 || mem_in.casb != '1)) begin
      if (first_cmd < 0) first_cmd <= cyc;
      last_cmd <= cyc;
    end
    if (rst_n && redun_en) begin
      frame      <= {frame[FRAME_W-2:0], redun};
      frame_bits <= frame_bits + 1;
    end
  end
endmodule
