// tb_rw_control_gen: runs the command sequencer for every march stage, in
// interleave and bank-by-bank mode, with random AC timing sets and random
// refresh requests. An independent monitor decodes the SDRAM strobes and
// checks
//   - every command against every AC limit of the run's timing set,
//   - the element order ACT (a,b) / column ops (a,b)... / PRE (a,b) and the
//     READ/WRITE kind and data polarity of each column op of the stage,
//   - write data and read expectations (a function of address and
//     polarity), reads tagged with the right bank/row/column,
//   - AUTO REFRESH only to the requested bank with all banks closed, and
//     ref_ack in the cycle it is decided,
//   - one advance per element and "done" exactly CAS_LATENCY+2 cycles
//     after the final PRE,
//   - that with data-sheet timing an interleaved stage-0 element takes
//     exactly 9 cycles (ACT-to-ACT of bank a).
module tb_rw_control_gen;
  import sdram_bist_pkg::*;
  localparam int NE = 6;      // elements per run
  localparam int CL = 2;

  logic clk = 1'b0, rst_n = 1'b1, start = 0, interleave = 0, bank_sel = 0;
  ac_timing_t timing = AC_SPEC;
  logic [1:0] stage = 0;
  logic run_last, ref_req = 0, ref_bank = 0;
  logic [1:0] row = 0, col = 0;
  logic [DQ_W-1:0] wdata;
  logic op_inv, advance, ref_ack, busy, done;
  sdram_in_t cmd;
  logic rd_valid, rd_bank;
  logic [DQ_W-1:0] rd_exp;
  logic [1:0] rd_row, rd_col;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rw_control_gen #(.ROW_W(2), .COL_W(2), .CAS_LATENCY(CL)) dut (.*);

  function automatic logic [DQ_W-1:0] dfun(logic [1:0] r, logic [1:0] c, logic inv);
    return {48'hA5A5_0000_1234, 8'(r), 7'(c), inv};
  endfunction
  assign wdata = dfun(row, col, op_inv);

  int elem = 0;
  assign run_last = (elem == NE - 1);
  always @(posedge clk) if (advance) begin
    elem <= elem + 1;
    {row, col} <= {row, col} + 4'd1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // Reference march table.
  function automatic int n_ops(int s);
    return (s == 0) ? 1 : (s == 1) ? 2 : (s == 2) ? 3 : 1;
  endfunction
  function automatic bit ref_wr(int s, int k);
    return (s == 0) || (s == 1 && k == 1) || (s == 2 && k == 1);
  endfunction
  function automatic bit ref_inv(int s, int k);
    return (s == 1 && k == 1) || (s == 2 && k == 0);
  endfunction

  // Monitor.
  longint cyc = 0;
  longint l_act [2], l_pre [2], l_wr [2];
  longint l_act_any, l_col, l_wr_any, last_pre_t, done_t, first_act_a, second_act_a;
  bit     open_b [2];
  int     pos;          // position inside the element
  int     n_adv = 0, n_ref = 0, n_elem_cmds = 0;
  bit     ack_d = 0;
  logic   ref_bank_d;

  task automatic reset_monitor();
    for (int b = 0; b < 2; b++) begin
      l_act[b] = -100; l_pre[b] = -100; l_wr[b] = -100; open_b[b] = 0;
    end
    l_act_any = -100; l_col = -100; l_wr_any = -100; last_pre_t = -1; done_t = -1;
    first_act_a = -1; second_act_a = -1; pos = 0;
  endtask

  always @(posedge clk) begin
    int nb, kind, b, k, slot;
    cyc <= cyc + 1;
    if (advance) n_adv++;
    if (done) done_t = cyc;
    // ref_ack decided in cycle t -> REF on the pins in t+1
    if (ack_d) begin
      check(cmd.rasb[ref_bank_d] == 0 && cmd.casb[ref_bank_d] == 0 && cmd.web[ref_bank_d] == 1,
            "REF follows ref_ack");
    end
    ack_d      <= ref_ack;
    ref_bank_d <= ref_bank;
    nb = interleave ? 2 : 1;
    for (int bb = 0; bb < 2; bb++) begin
      kind = {cmd.rasb[bb], cmd.casb[bb], cmd.web[bb]};
      if (kind == 3'b111) continue;
      slot = interleave ? bb : 0;
      if (!interleave && kind != 3'b001) check(bb == int'(bank_sel), "bank-by-bank uses bank_sel only");
      case (kind)
        3'b011: begin
          check(pos == slot, $sformatf("ACT order pos %0d", pos));
          check(!open_b[bb], "ACT to closed bank");
          check(cyc - l_pre[bb] >= timing.rp, "tRP");
          check(cyc - l_act[bb] >= timing.rc, "tRC");
          check(cyc - l_act_any >= timing.rrd, "tRRD");
          open_b[bb] = 1; l_act[bb] = cyc; l_act_any = cyc; pos++;
          if (bb == 0) begin
            if (first_act_a < 0) first_act_a = cyc;
            else if (second_act_a < 0) second_act_a = cyc;
          end
        end
        3'b101, 3'b100: begin
          k = (pos - nb) / nb;
          check(pos >= nb && pos < nb + nb * n_ops(stage) && (pos - nb) % nb == slot, "column op order");
          check(open_b[bb], "column op to open bank");
          check(cyc - l_act[bb] >= timing.rcd, "tRCD");
          check(cyc - l_col >= timing.ccd, "tCCD");
          check(cyc - l_wr_any >= timing.cdl, "tCDL");
          check((kind == 3'b100) == ref_wr(stage, k), "read/write kind of op");
          if (kind == 3'b100) begin
            check(cmd.din == dfun(cmd.row[1:0], cmd.col[1:0], ref_inv(stage, k)), "write data");
            l_wr[bb] = cyc; l_wr_any = cyc;
          end else begin
            check(rd_valid && rd_bank == 1'(bb) && rd_row == cmd.row[1:0] && rd_col == cmd.col[1:0] &&
                  rd_exp == dfun(cmd.row[1:0], cmd.col[1:0], ref_inv(stage, k)), "read tag");
          end
          l_col = cyc; pos++;
        end
        3'b010: begin
          check(pos == nb + nb * n_ops(stage) + slot, "PRE order");
          check(cyc - l_act[bb] >= timing.ras, "tRAS");
          check(cyc - l_wr[bb] >= timing.cdl, "write to PRE");
          open_b[bb] = 0; l_pre[bb] = cyc; last_pre_t = cyc; pos++;
          if (pos == 2 * nb + nb * n_ops(stage)) pos = 0;
        end
        3'b001: begin
          n_ref++;
          check(pos == 0 && !open_b[0] && !open_b[1], "REF with banks closed, between elements");
          check(cyc - l_pre[bb] >= timing.rp && cyc - l_act[bb] >= timing.rc, "REF timing");
          l_act[bb] = cyc; l_act_any = cyc;
        end
        default: check(0, "illegal command");
      endcase
    end
    if (cmd.rasb == '1 && cmd.casb == '1) check(!rd_valid, "no read tag without read");
  end

  // Refresh requester (like the stage/refresh counter).
  always @(posedge clk) begin
    if (ref_ack) ref_req <= 0;
    else if (!ref_req && $urandom % 40 == 0) begin
      ref_req  <= 1;
      ref_bank <= 1'($urandom);
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int r = 0; r < 24; r++) begin
      @(negedge clk);
      stage = 2'(r % 4);
      interleave = 1'((r / 4) % 2);
      bank_sel = 1'($urandom);
      if (r < 8) timing = AC_SPEC;
      else timing = '{rrd: 5'($urandom % 6 + 1), rcd: 5'($urandom % 6 + 1), rp: 5'($urandom % 6 + 1),
                      ras: 5'($urandom % 10 + 1), rc: 5'($urandom % 12 + 1), cdl: 5'($urandom % 4 + 1),
                      ccd: 5'($urandom % 4 + 1)};
      elem = 0; n_adv = 0; row = 0; col = 0;
      reset_monitor();
      if (r == 4) force ref_req = 0;      // no refresh during the exact-length run
      start = 1;
      @(negedge clk) start = 0;
      wait (done);
      @(posedge clk);
      @(negedge clk);
      check(n_adv == NE, $sformatf("run %0d advances %0d", r, n_adv));
      check(done_t - last_pre_t == CL + 2, $sformatf("done %0d cycles after last PRE", done_t - last_pre_t));
      check(!busy && pos == 0, "idle at element boundary");
      if (r == 4) begin
        check(second_act_a - first_act_a == 9, $sformatf("stage-0 interleaved element %0d cycles",
              second_act_a - first_act_a));
        release ref_req;
      end
    end
    check(n_ref > 0, "refreshes served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
