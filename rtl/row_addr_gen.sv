// row_addr_gen: row (X) address generator.
//
// An up/down counter over the ROW_W-bit row address, stepped when the column
// address wraps (the caller gates "step" with the column's last flag). "load"
// presets the first row of a stage: zero counting up, all ones counting down.
// "last" flags the final row in the present direction. Output changes on the
// clock after step/load.
// The up/down row counter is the document's; its place as the slow
// address is this design's choice.
module row_addr_gen #(
  parameter int unsigned ROW_W = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             load_down,
  input  logic             step,
  input  logic             down,
  output logic [ROW_W-1:0] row,
  output logic             last
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      row <= '0;
    else if (load)   row <= load_down ? '1 : '0;
    else if (step)   row <= down ? row - 1'b1 : row + 1'b1;
  end
  assign last = down ? (row == '0) : (row == '1);
endmodule
