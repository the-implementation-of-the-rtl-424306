// tb_bist_clock_gen: BIST_on is toggled at random times (away from the
// clock edge); bist_en must follow it exactly two TCLKT edges later and
// bist_start must pulse for one cycle on each rising edge of bist_en.
module tb_bist_clock_gen;
  logic tclk = 1'b0, rst_n = 1'b1, bist_on = 1'b0, bist_en, bist_start;
  logic [2:0] hist;   // bist_on sampled at the last three edges
  logic en_d;
  int checks = 0, failures = 0, starts = 0;

  always #5 tclk = ~tclk;

  bist_clock_gen dut (.*);

  initial begin
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
  end

  always @(posedge tclk) begin
    if (!rst_n) begin
      hist <= '0;
      en_d <= 1'b0;
    end else begin
      hist <= {hist[1:0], bist_on};
      en_d <= hist[1];
    end
  end

  always @(negedge tclk) if (rst_n) begin
    checks++;
    if (bist_en != hist[1] || bist_start != (hist[1] & ~en_d)) begin
      failures++;
      $display("FAIL: en %0d start %0d exp %0d/%0d", bist_en, bist_start, hist[1], hist[1] & ~en_d);
    end
    if (bist_start) starts++;
  end

  initial begin
    repeat (4) @(posedge tclk);
    for (int i = 0; i < 20; i++) begin
      #($urandom % 60 + 12);
      bist_on = ~bist_on;
    end
    repeat (5) @(posedge tclk);
    checks++;
    if (starts != 10) begin
      failures++;
      $display("FAIL: %0d start pulses", starts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge tclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
