// bist_clock_gen: BIST clock generator.
//
// The whole BIST runs on the external test clock TCLKT, the same clock that
// drives the SDRAM, so that the memory is exercised at its real rate. This
// block brings the asynchronous BIST_on mode pin into the TCLKT domain with a
// two-flop synchronizer and derives from it the BIST enable level (which also
// steers the input multiplexers) and a one-cycle start pulse on its rising
// edge. A clock enable is used instead of a gated clock so that the BIST and
// the SDRAM share one clock tree; that choice is this design's own.
module bist_clock_gen (
  input  logic tclk,
  input  logic rst_n,
  input  logic bist_on,     // asynchronous BIST mode pin
  output logic bist_en,     // synchronized BIST mode
  output logic bist_start   // one TCLKT cycle at the start of BIST mode
);
  logic [1:0] sync;
  logic       en_q;

  always_ff @(posedge tclk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= '0;
      en_q <= 1'b0;
    end else begin
      sync <= {sync[0], bist_on};
      en_q <= sync[1];
    end
  end

  assign bist_en    = sync[1];
  assign bist_start = sync[1] & ~en_q;
endmodule
