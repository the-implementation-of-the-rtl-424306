// tb_row_addr_gen: test of the row address generator (3-bit instance).
// Loads the start address of an upward and a downward stage and steps
// through a full sweep with random idle cycles, comparing the address and
// the last flag every cycle with a reference counter kept by the test.
module tb_row_addr_gen;
  localparam int unsigned W = 3;
  logic clk = 1'b0, rst_n = 1'b1, load = 1'b0, load_down = 1'b0, step = 1'b0, down = 1'b0;
  logic [W-1:0] row;
  logic last;
  int ref_addr = 0;
  int checks = 0, failures = 0, steps = 0;

  always #5 clk = ~clk;

  row_addr_gen #(.ROW_W(W)) dut (.clk, .rst_n, .load, .load_down, .step, .down, .row, .last);

  task automatic check_now();
    #1;
    checks++;
    if (row != W'(ref_addr) || last != (down ? ref_addr == 0 : ref_addr == 2**W - 1)) begin
      failures++;
      $display("FAIL: addr %0d exp %0d last %0d down %0d", row, ref_addr, last, down);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int pass = 0; pass < 4; pass++) begin
      @(negedge clk);
      load = 1'b1; load_down = pass[0]; step = 1'b1;   // load wins over step
      @(negedge clk);
      load = 1'b0; step = 1'b0; down = pass[0];
      ref_addr = pass[0] ? 2**W - 1 : 0;
      check_now();
      while (steps < (pass + 1) * 2**W) begin
        step = ($urandom % 3) != 0;
        @(negedge clk);
        if (step) begin
          ref_addr = down ? (ref_addr + 2**W - 1) % 2**W : (ref_addr + 1) % 2**W;
          steps++;
        end
        check_now();
      end
      step = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
