// bist_output_if: BIST information output interface.
//
// Drives the two BIST result pins. ERROR goes to 1 on the first compare
// error after test_start and stays there until the next test; it is 0 for a
// memory that never failed. REDUN carries the redundancy information in
// series once the test is over: when "done" pulses, the frame
//   {result[2:0], ac_fail_mask[6:0], captured, fail_bank, fail_row,
//    fail_col, fail_bit[5:0], fail_clk}
// is loaded and shifted out MSB first, one bit per clock, while "redun_en"
// is high (FRAME_W cycles starting the cycle after "done"). "test_done"
// stays high from then until the next test_start. The pin behaviour of
// ERROR follows the document; the frame layout and the framing strobe are
// this design's choices.
module bist_output_if
  import sdram_bist_pkg::*;
#(
  parameter int unsigned ROW_W = 9,
  parameter int unsigned COL_W = 8,
  parameter int unsigned CNT_W = 32,
  localparam int unsigned FRAME_W = 3 + NUM_AC + 2 + ROW_W + COL_W + 6 + CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             test_start,
  input  logic             err,
  input  logic             done,
  input  result_e          result,
  input  logic [NUM_AC-1:0] ac_fail_mask,
  input  logic             captured,
  input  logic             fail_bank,
  input  logic [ROW_W-1:0] fail_row,
  input  logic [COL_W-1:0] fail_col,
  input  logic [5:0]       fail_bit,
  input  logic [CNT_W-1:0] fail_clk,
  output logic             error,
  output logic             redun,
  output logic             redun_en,
  output logic             test_done
);
  localparam int unsigned LEFT_W = $clog2(FRAME_W + 1);

  logic [FRAME_W-1:0] shreg;
  logic [LEFT_W-1:0]  left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      error     <= 1'b0;
      shreg     <= '0;
      left      <= '0;
      test_done <= 1'b0;
    end else if (test_start) begin
      error     <= 1'b0;
      shreg     <= '0;
      left      <= '0;
      test_done <= 1'b0;
    end else begin
      if (err) error <= 1'b1;
      if (done) begin
        shreg     <= {result, ac_fail_mask, captured, fail_bank, fail_row,
                      fail_col, fail_bit, fail_clk};
        left      <= LEFT_W'(FRAME_W);
        test_done <= 1'b1;
      end else if (left != '0) begin
        shreg <= shreg << 1;
        left  <= left - 1'b1;
      end
    end
  end

  assign redun    = (left != '0) & shreg[FRAME_W-1];
  assign redun_en = (left != '0);
endmodule
