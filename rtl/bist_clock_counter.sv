// bist_clock_counter: counts TCLKT cycles from the start of the self-test.
//
// "clear" restarts the count at zero (it has priority), "en" lets it count
// one per clock. The count saturates at all ones instead of wrapping, so a
// captured clock number is never ambiguous. CNT_W = 32 covers more than 40 s
// at 100 MHz, well beyond one complete test.
// The counter is the document's; its width and saturation are this
// design's choices.
module bist_clock_counter #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  output logic [CNT_W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     count <= '0;
    else if (clear)                 count <= '0;
    else if (en && count != '1)     count <= count + 1'b1;
  end
endmodule
