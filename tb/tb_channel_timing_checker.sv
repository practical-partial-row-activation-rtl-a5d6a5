// tb_channel_timing_checker: measures every spacing rule of the checker.
//
// A probe presents a candidate command for half a cycle, reads row_ok/col_ok and takes
// the command back unless it is legal, so the first cycle in which the command is
// accepted gives the minimum spacing the checker enforces. Each measured spacing is
// compared with the number the design prescribes: tRRD 2, tRCD/2 8, tCCD_S 2 between
// banks, tCCD+6 = 8 within a bank, RD->WR 18, WR->RD 22, WR->PRE 33, RD->PRE 18,
// PRE->ACT 16, ACT->PRE 29. Commands to a closed bank and ACT to an open bank must be
// refused, and violation_o must pulse after an illegal command and never otherwise.
module tb_channel_timing_checker;
  import ppa_pkg::*;
  logic clk = 0, rst_n = 0;
  row_op_e row_op;  logic [4:0] row_bank;
  col_op_e col_op;  logic [4:0] col_bank;
  logic row_ok, col_ok, violation;
  logic [31:0] open;
  int checks = 0, failures = 0, cyc = 0;
  bit illegal_sent = 0;

  channel_timing_checker #(.NUM_BANKS(32)) dut (
    .clk_i(clk), .rst_ni(rst_n), .row_op_i(row_op), .row_bank_i(row_bank),
    .col_op_i(col_op), .col_bank_i(col_bank), .row_ok_o(row_ok), .col_ok_o(col_ok),
    .violation_o(violation), .open_o(open));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      #2;
      checks++;
      if (violation != illegal_sent) begin
        failures++; $display("FAIL violation flag (cycle %0d)", cyc);
      end
      illegal_sent = 0;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // issue a command in the next cycle regardless of legality
  task automatic issue(input row_op_e r, input int rb, input col_op_e c, input int cb,
                       output int t);
    @(negedge clk);
    row_op = r; row_bank = 5'(rb); col_op = c; col_bank = 5'(cb);
    #1;
    illegal_sent = !(row_ok && col_ok);
    t = cyc;
    @(negedge clk);
    row_op = ROW_NOP; col_op = COL_NOP;
    #1;
  endtask

  // wait until the command is legal, issue it, return its cycle
  task automatic measure(input row_op_e r, input int rb, input col_op_e c, input int cb,
                         output int t);
    bit ok;
    ok = 0;
    while (!ok) begin
      @(negedge clk);
      row_op = r; row_bank = 5'(rb); col_op = c; col_bank = 5'(cb);
      #1;
      ok = row_ok && col_ok;
      t = cyc;
      if (!ok) begin row_op = ROW_NOP; col_op = COL_NOP; end
    end
    @(negedge clk);
    row_op = ROW_NOP; col_op = COL_NOP;
    #1;
  endtask

  task automatic expect_gap(input int got, input int want, input string what);
    checks++;
    if (got != want) begin
      failures++; $display("FAIL %s: spacing %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_act0, t_act1, t_rd0, t_rd1, t_rd0b, t_wr1, t_rd0c, t, t_pre0, t_act0b, t_pre0b;
    row_op = ROW_NOP; col_op = COL_NOP; row_bank = 0; col_bank = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // a closed bank refuses column commands, PRE to it is harmless
    @(negedge clk); col_op = COL_RD; col_bank = 3; #1 chk(!col_ok, "RD to closed bank refused");
    col_op = COL_WR; #1 chk(!col_ok, "WR to closed bank refused");
    col_op = COL_NOP; row_op = ROW_PRE; row_bank = 3; #1 chk(row_ok, "PRE to closed bank");
    row_op = ROW_NOP;
    issue(ROW_ACT, 0, COL_NOP, 0, t_act0);
    measure(ROW_ACT, 1, COL_NOP, 0, t_act1);   expect_gap(t_act1 - t_act0, 2, "tRRD");
    @(negedge clk); row_op = ROW_ACT; row_bank = 0; #1 chk(!row_ok, "ACT to open bank refused");
    row_op = ROW_NOP;
    measure(ROW_NOP, 0, COL_RD, 0, t_rd0);     expect_gap(t_rd0 - t_act0, 8, "tRCD/2");
    measure(ROW_NOP, 0, COL_RD, 1, t_rd1);     expect_gap(t_rd1 - t_rd0, 2, "tCCD_S other bank");
    measure(ROW_NOP, 0, COL_RD, 0, t_rd0b);    expect_gap(t_rd0b - t_rd0, 8, "tCCD+6 same bank");
    measure(ROW_NOP, 0, COL_WR, 1, t_wr1);     expect_gap(t_wr1 - t_rd0b, 18, "RD to WR");
    measure(ROW_NOP, 0, COL_RD, 0, t_rd0c);    expect_gap(t_rd0c - t_wr1, 22, "WR to RD (tWTR+6)");
    measure(ROW_PRE, 1, COL_NOP, 0, t);        expect_gap(t - t_wr1, 33, "WR to PRE (tWR+6)");
    measure(ROW_PRE, 0, COL_NOP, 0, t_pre0);   expect_gap(t_pre0 - t_rd0c, 18, "RD to PRE (tRTP)");
    measure(ROW_ACT, 0, COL_NOP, 0, t_act0b);  expect_gap(t_act0b - t_pre0, 16, "tRP");
    measure(ROW_PRE, 0, COL_NOP, 0, t_pre0b);  expect_gap(t_pre0b - t_act0b, 29, "tRAS");
    chk(open == 32'h0, "all banks closed");
    // an illegal command is reported one cycle later
    issue(ROW_NOP, 0, COL_RD, 5, t);
    repeat (3) @(negedge clk);
    issue(ROW_ACT, 7, COL_NOP, 0, t);
    issue(ROW_ACT, 8, COL_NOP, 0, t);          // too close to the previous ACT
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
