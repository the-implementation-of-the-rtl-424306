// stage_refresh_counter: march stage counter and refresh counter.
//
// Stage counter. One march pass has four stages over all addresses of the
// banks under test:
//   stage 0, addresses up  : write D
//   stage 1, addresses up  : read D, write D-bar
//   stage 2, addresses down: read D-bar, write D, read D
//   stage 3, addresses up  : read D
// and the test runs two passes, one per data background (checkerboard, then
// 0x55/0xAA). "start" resets stage and pass and loads the address
// generators; each "advance" (end of one march element) on the last address
// moves to the next stage and reloads the address generators with the first
// address of the new direction. "run_last" marks the final element of the
// run, so the sequencer can stop after it.
//
// Refresh counter. While "active", an interval timer raises "ref_req" every
// REF_INTERVAL cycles (16 ms / 1024 = 15.6 us = 1562 cycles at 100 MHz).
// The sequencer answers with "ref_ack" when it has issued the auto refresh;
// "ref_count" counts the refreshes issued and its LSB picks the bank to
// refresh next, so each bank gets 512 of the 1024 refreshes.
// The stage sequence follows the document; the interval timer, the
// alternating bank and the handshake are this design's choices.
module stage_refresh_counter
  import sdram_bist_pkg::*;
#(
  parameter int unsigned REF_INTERVAL = 1562,
  parameter int unsigned REF_CNT_W    = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 advance,
  input  logic                 col_last,
  input  logic                 row_last,
  input  logic                 active,
  input  logic                 ref_ack,
  output logic [1:0]           stage,
  output pattern_e             pattern,
  output logic                 down,
  output logic                 addr_load,
  output logic                 load_down,
  output logic                 run_last,
  output logic                 ref_req,
  output logic                 ref_bank,
  output logic [REF_CNT_W-1:0] ref_count
);
  localparam int unsigned TIM_W = $clog2(REF_INTERVAL + 1);

  logic             stage_end;
  logic [1:0]       next_stage;
  logic [TIM_W-1:0] ref_timer;

  assign stage_end  = advance & col_last & row_last;
  assign next_stage = stage + 2'd1;
  assign addr_load  = start | stage_end;
  assign load_down  = start ? 1'b0 : stage_down(next_stage);
  assign down       = stage_down(stage);
  assign run_last   = col_last & row_last & (stage == 2'd3) & (pattern == PAT_5A);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage   <= 2'd0;
      pattern <= PAT_CHECKER;
    end else if (start) begin
      stage   <= 2'd0;
      pattern <= PAT_CHECKER;
    end else if (stage_end) begin
      stage <= next_stage;
      if (stage == 2'd3) pattern <= PAT_5A;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_timer <= '0;
      ref_req   <= 1'b0;
      ref_count <= '0;
    end else begin
      if (!active) begin
        ref_timer <= '0;
      end else if (ref_timer == TIM_W'(REF_INTERVAL - 1)) begin
        ref_timer <= '0;
        ref_req   <= 1'b1;
      end else begin
        ref_timer <= ref_timer + 1'b1;
      end
      if (ref_ack) begin
        ref_req   <= 1'b0;
        ref_count <= ref_count + 1'b1;
      end
    end
  end

  assign ref_bank = ref_count[0];
endmodule
