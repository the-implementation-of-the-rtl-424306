// col_addr_gen: column (Y) address generator.
//
// An up/down counter over the COL_W-bit column address. The column address
// is the fast-moving one: it steps once per march element, and its "last"
// flag (all ones when counting up, zero when counting down) lets the row
// address generator step. "load" presets the counter to the first address of
// a stage (zero for an upward stage, all ones for a downward one) and has
// priority over "step". Output changes on the clock after step/load.
// An address counter that counts up or down is the document's; treating
// the column as the fast address is this design's reading of "Y-March".
module col_addr_gen #(
  parameter int unsigned COL_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             load_down,
  input  logic             step,
  input  logic             down,
  output logic [COL_W-1:0] col,
  output logic             last
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      col <= '0;
    else if (load)   col <= load_down ? '1 : '0;
    else if (step)   col <= down ? col - 1'b1 : col + 1'b1;
  end
  assign last = down ? (col == '0) : (col == '1);
endmodule
