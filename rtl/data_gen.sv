// data_gen: SDRAM data generator of the BIST.
//
// Produces the 64-bit word written to the SDRAM and, for reads, the word the
// comparator expects back. Two data backgrounds are used, one per march pass:
// a physical checkerboard (all-zero and all-one words alternating with the
// parity of row and column address, so neighbouring cells in both directions
// hold opposite data) and a solid 0x55../0xAA.. background. "inv" selects the
// complement ("test data bar"). Purely combinational.
// The two backgrounds follow the document; their exact bit patterns are this
// design's choice.
module data_gen
  import sdram_bist_pkg::*;
(
  input  pattern_e        pattern,
  input  logic            row_lsb,
  input  logic            col_lsb,
  input  logic            inv,
  output logic [DQ_W-1:0] data
);
  always_comb begin
    unique case (pattern)
      PAT_CHECKER: data = {DQ_W{row_lsb ^ col_lsb}};
      PAT_5A:      data = {(DQ_W/2){2'b01}};
    endcase
    data = data ^ {DQ_W{inv}};
  end
endmodule
