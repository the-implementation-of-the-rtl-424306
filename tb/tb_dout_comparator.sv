// tb_dout_comparator: random reads with CAS latency 2. The test plays the
// SDRAM: it returns the expected word two cycles after each read, with a
// random single-bit or multi-bit error on some of them, and checks that
// err pulses exactly three cycles after the read (one after the compare)
// with the read's bank/row/column and the lowest differing bit, and never
// otherwise.
module tb_dout_comparator;
  import sdram_bist_pkg::*;
  localparam int CL = 2;
  logic clk = 1'b0, rst_n = 1'b1;
  logic rd_valid = 1'b0, rd_bank = 1'b0;
  logic [DQ_W-1:0] rd_exp = '0, dout;
  logic [8:0] rd_row = '0;
  logic [7:0] rd_col = '0;
  logic cmp_valid, err, err_bank;
  logic [8:0] err_row;
  logic [7:0] err_col;
  logic [5:0] err_bit;
  int checks = 0, failures = 0, n_err = 0;

  typedef struct { bit v; bit bad; logic [DQ_W-1:0] flip; logic b; logic [8:0] r; logic [7:0] c; } rec_t;
  rec_t hist [4];

  always #5 clk = ~clk;

  dout_comparator #(.CAS_LATENCY(CL)) dut (.*);

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int i = 0; i < 4; i++) hist[i] = '{0, 0, '0, 0, '0, '0};
    for (int i = 0; i < 500; i++) begin
      rec_t n;
      @(negedge clk);
      n.v = 1'($urandom % 3 != 0);
      n.bad = n.v && ($urandom % 4 == 0);
      n.flip = n.bad ? ((64'd1 << ($urandom % 64)) | (($urandom % 2) ? (64'd1 << 63) : 64'd0)) : '0;
      n.b = 1'($urandom); n.r = 9'($urandom); n.c = 8'($urandom);
      rd_valid = n.v; rd_bank = n.b; rd_row = n.r; rd_col = n.c;
      rd_exp = {$urandom, $urandom};
      // SDRAM returns the word of the read two cycles ago.
      for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = n;
      // hist[k] = read issued k cycles ago (0 = this cycle)
      // err now reflects the read of 3 cycles ago.
      checks++;
      if (err != hist[3].bad) begin
        failures++;
        $display("FAIL: err %0d exp %0d at %0d", err, hist[3].bad, i);
      end
      if (hist[3].bad) begin
        int low;
        n_err++;
        low = 0;
        for (int b = 63; b >= 0; b--) if (hist[3].flip[b]) low = b;
        checks++;
        if (err_bank != hist[3].b || err_row != hist[3].r || err_col != hist[3].c || err_bit != 6'(low)) begin
          failures++;
          $display("FAIL: address b%0d r%0d c%0d bit%0d", err_bank, err_row, err_col, err_bit);
        end
      end
    end
    checks++;
    if (n_err < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Data path of the "SDRAM": expected word of the read two cycles ago.
  logic [DQ_W-1:0] exp_d [CL];
  logic [DQ_W-1:0] flip_d [CL];
  always @(posedge clk) begin
    exp_d[0] <= rd_exp;
    flip_d[0] <= hist[0].flip;
    for (int i = 1; i < CL; i++) begin
      exp_d[i] <= exp_d[i-1];
      flip_d[i] <= flip_d[i-1];
    end
  end
  assign dout = exp_d[CL-1] ^ flip_d[CL-1];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
