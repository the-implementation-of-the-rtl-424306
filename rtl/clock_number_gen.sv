// clock_number_gen: clock number register and fail address register.
//
// Together with the BIST clock counter this forms the fail address
// indicating block. On the first compare error after "clear" it stores the
// clock number at which the error was seen and the failing cell: bank, row,
// column and bit position. Later errors leave the stored values alone but
// are counted in a saturating error counter. The stored values are later
// shifted out on REDUN as repair (redundancy) information.
// Registered; the capture happens on the clock edge where err is high.
// Storing the clock number and the fail address follows the document;
// keeping the first error and the error counter are this design's choices.
module clock_number_gen #(
  parameter int unsigned ROW_W = 9,
  parameter int unsigned COL_W = 8,
  parameter int unsigned CNT_W = 32,
  parameter int unsigned ERR_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             err,
  input  logic             err_bank,
  input  logic [ROW_W-1:0] err_row,
  input  logic [COL_W-1:0] err_col,
  input  logic [5:0]       err_bit,
  input  logic [CNT_W-1:0] clk_count,
  output logic             captured,
  output logic [CNT_W-1:0] fail_clk,
  output logic             fail_bank,
  output logic [ROW_W-1:0] fail_row,
  output logic [COL_W-1:0] fail_col,
  output logic [5:0]       fail_bit,
  output logic [ERR_W-1:0] err_count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      captured  <= 1'b0;
      fail_clk  <= '0;
      fail_bank <= 1'b0;
      fail_row  <= '0;
      fail_col  <= '0;
      fail_bit  <= '0;
      err_count <= '0;
    end else if (clear) begin
      captured  <= 1'b0;
      fail_clk  <= '0;
      fail_bank <= 1'b0;
      fail_row  <= '0;
      fail_col  <= '0;
      fail_bit  <= '0;
      err_count <= '0;
    end else if (err) begin
      if (!captured) begin
        captured  <= 1'b1;
        fail_clk  <= clk_count;
        fail_bank <= err_bank;
        fail_row  <= err_row;
        fail_col  <= err_col;
        fail_bit  <= err_bit;
      end
      if (err_count != '1) err_count <= err_count + 1'b1;
    end
  end
endmodule
