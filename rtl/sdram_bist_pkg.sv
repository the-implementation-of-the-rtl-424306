// sdram_bist_pkg: types and constants shared by the SDRAM BIST modules.
//
// The embedded SDRAM is a dual-bank part with 512 rows, 256 columns and a
// 64-bit separate data in/out bus, CAS latency 2, burst length 1, run at
// 100 MHz (10 ns clock). Its operating AC parameters (tRRD, tRCD, tRP, tRAS,
// tRC, tCDL, tCCD) are given in ns and are held here in clock cycles at
// 100 MHz. Per-bank strobes RASB/CASB/WEB are active low and use the usual
// SDRAM command truth table (ACT, READ, WRITE, PRECHARGE, AUTO REFRESH).
// Everything about the march ordering, the relaxed ("maximum margin")
// timing and the result codes is this design's own choice.
package sdram_bist_pkg;

  localparam int unsigned NUM_BANKS   = 2;
  localparam int unsigned DQ_W        = 64;
  localparam int unsigned TW          = 5;   // width of one timing field in cycles
  localparam int unsigned NUM_AC      = 7;   // number of AC parameters in the timing set

  // Index of each AC parameter in the constraint loop and in the fail mask.
  typedef enum logic [2:0] {
    AC_RRD = 3'd0,
    AC_RCD = 3'd1,
    AC_RP  = 3'd2,
    AC_RAS = 3'd3,
    AC_RC  = 3'd4,
    AC_CDL = 3'd5,
    AC_CCD = 3'd6
  } ac_param_e;

  // One set of AC timing limits, all in clock cycles.
  typedef struct packed {
    logic [TW-1:0] rrd;  // ACT to ACT, different bank
    logic [TW-1:0] rcd;  // ACT to READ/WRITE, same bank
    logic [TW-1:0] rp;   // PRECHARGE to ACT, same bank
    logic [TW-1:0] ras;  // ACT to PRECHARGE, same bank
    logic [TW-1:0] rc;   // ACT to ACT, same bank
    logic [TW-1:0] cdl;  // WRITE to next column command / to PRECHARGE
    logic [TW-1:0] ccd;  // column command to column command
  } ac_timing_t;

  // Data-sheet timing at 100 MHz: 20/30/30/60/90/10/10 ns.
  localparam ac_timing_t AC_SPEC = '{rrd: 5'd2, rcd: 5'd3, rp: 5'd3, ras: 5'd6,
                                     rc: 5'd9, cdl: 5'd1, ccd: 5'd1};

  // Per-bank strobes and addresses that drive the SDRAM (all active-low strobes).
  typedef struct packed {
    logic                 cke;
    logic [NUM_BANKS-1:0] rasb;   // [0] = bank a, [1] = bank b
    logic [NUM_BANKS-1:0] casb;
    logic [NUM_BANKS-1:0] web;
    logic [8:0]           row;
    logic [7:0]           col;
    logic [DQ_W-1:0]      din;
  } sdram_in_t;

  localparam sdram_in_t SDRAM_NOP = '{cke: 1'b1, rasb: '1, casb: '1, web: '1,
                                      row: '0, col: '0, din: '0};

  // Test data backgrounds of the two march passes.
  typedef enum logic {
    PAT_CHECKER = 1'b0,   // physical checkerboard: all-0 / all-1 words alternating
    PAT_5A      = 1'b1    // 0x55.. / 0xAA.. solid background
  } pattern_e;

  // Phases of the test flow.
  typedef enum logic [1:0] {
    PH_INTERLEAVE = 2'd0,  // both banks interleaved, data-sheet timing
    PH_MIN_MARGIN = 2'd1,  // bank by bank, data-sheet timing
    PH_MAX_MARGIN = 2'd2,  // bank by bank, relaxed timing
    PH_CONSTRAIN  = 2'd3   // bank by bank, one parameter at data-sheet value
  } phase_e;

  // Final verdict.
  typedef enum logic [2:0] {
    RES_NONE        = 3'd0,  // test not finished
    RES_GOOD        = 3'd1,  // no failure in the interleave test
    RES_INTERLEAVE  = 3'd2,  // fails only under bank interleaving
    RES_NOT_AT_RATE = 3'd3,  // fails even with relaxed timing
    RES_AC_FAIL     = 3'd4   // fails with data-sheet timing; see AC fail mask
  } result_e;

  // March element of each stage: number of column operations per address,
  // and for operation k whether it writes and whether it uses inverted data.
  function automatic logic [1:0] stage_ops(input logic [1:0] stage);
    unique case (stage)
      2'd0: return 2'd1;   // w D
      2'd1: return 2'd2;   // r D, w ~D
      2'd2: return 2'd3;   // r ~D, w D, r D
      default: return 2'd1; // r D
    endcase
  endfunction

  function automatic logic op_is_write(input logic [1:0] stage, input logic [1:0] k);
    unique case (stage)
      2'd0: return 1'b1;
      2'd1: return k == 2'd1;
      2'd2: return k == 2'd1;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic op_inverted(input logic [1:0] stage, input logic [1:0] k);
    unique case (stage)
      2'd1: return k == 2'd1;
      2'd2: return k == 2'd0;
      default: return 1'b0;
    endcase
  endfunction

  // Stage 2 walks the addresses downwards, the others upwards.
  function automatic logic stage_down(input logic [1:0] stage);
    return stage == 2'd2;
  endfunction

endpackage
