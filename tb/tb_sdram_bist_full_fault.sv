// tb_sdram_bist_full_fault: full-size self-test (default parameters) of an
// SDRAM with one stuck-at-0 cell: bank b, row 300, column 77, bit 42. The
// cell fails at any timing, so the flow must run the interleave test, both
// bank-by-bank tests and the relaxed test of bank b, and stop with
// RES_NOT_AT_RATE. The serial REDUN frame must name the cell, and the
// clock number must fall inside the interleave run (first 11.1 M cycles).
module tb_sdram_bist_full_fault;
  import sdram_bist_pkg::*;

  localparam int FW = 3 + NUM_AC + 2 + 9 + 8 + 6 + 32;

  logic            clk = 1'b0, rst_n = 1'b1, bist_on = 1'b0;
  sdram_in_t       mem_in;
  logic [DQ_W-1:0] mem_dout;
  logic            error, redun, redun_en, test_done;
  logic [FW-1:0]   frame = '0;
  int              nbits = 0, runs = 0;
  int              checks = 0, failures = 0;

  always #5 clk = ~clk;

  sdram_bist_top dut (.tclk(clk), .rst_n, .bist_on, .normal_in(SDRAM_NOP), .mem_in, .mem_dout,
                      .error, .redun, .redun_en, .test_done);

  sdram_model #(.STUCK_EN(1'b1), .STUCK_BANK(1'b1), .STUCK_ROW(300), .STUCK_COL(77),
                .STUCK_BIT(42), .STUCK_VAL(1'b0)) u_mem (.clk, .in(mem_in), .dout(mem_dout));

  always @(posedge clk) begin
    if (rst_n && redun_en) begin
      frame <= {frame[FW-2:0], redun};
      nbits <= nbits + 1;
    end
    if (dut.run_start) runs <= runs + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n   = 1'b1;
    bist_on = 1'b1;
    wait (test_done);
    repeat (FW + 5) @(posedge clk);
    $display("runs %0d frame %h", runs, frame);
    check(nbits == FW, "frame length");
    check(result_e'(frame[FW-1 -: 3]) == RES_NOT_AT_RATE, "verdict not at rate");
    check(frame[FW-11] == 1'b1, "failure captured");
    check(frame[FW-12] == 1'b1, "fail bank b");
    check(frame[54:46] == 9'd300, $sformatf("fail row %0d", frame[54:46]));
    check(frame[45:38] == 8'd77, $sformatf("fail col %0d", frame[45:38]));
    check(frame[37:32] == 6'd42, $sformatf("fail bit %0d", frame[37:32]));
    check(frame[31:0] > 0 && frame[31:0] < 32'd11_100_000, "clock number within the interleave run");
    check(runs == 4, "interleave, bank a, bank b, relaxed bank b");
    check(error, "ERROR high");
    check(u_mem.proto_errs == 0, "no protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
