// input_mux_array: the 2x1 multiplexer array in front of the SDRAM inputs.
//
// In BIST mode (bist_mode = 1) every SDRAM input - clock enable, the per-bank
// RASB/CASB/WEB strobes, row and column address and the 64-bit write data -
// comes from the BIST; otherwise it comes from the surrounding logic. Purely
// combinational. The SDRAM clock itself is not multiplexed: both sides run
// on the same clock in this design.
// The 2x1 multiplexer array in front of the memory is the document's.
module input_mux_array
  import sdram_bist_pkg::*;
(
  input  logic      bist_mode,
  input  sdram_in_t normal_in,
  input  sdram_in_t bist_in,
  output sdram_in_t mem_in
);
  assign mem_in = bist_mode ? bist_in : normal_in;
endmodule
