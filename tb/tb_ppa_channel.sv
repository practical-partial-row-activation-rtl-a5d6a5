// tb_ppa_channel: one channel, four banks interleaved.
//
// Four banks are opened 2 cycles apart, 32 columns are written round-robin (one column
// command every 2 cycles, so each bank sees one every 8), then read back the same way.
// Although one PPA bank can only take a column command every 8 cycles, four interleaved
// banks must keep the DQ bus busy in every cycle of the read phase: the test checks
// that the bursts arrive back to back for 64 consecutive cycles, in order, with the
// written data, 26 cycles after each RD. All these commands are legal, so row_ok/col_ok
// must be high and violation low. A same-bank read 4 cycles after the previous one must
// be refused, and a read to a closed bank refused and, when sent, flagged by both the
// timing checker and the bank.
module tb_ppa_channel;
  import ppa_pkg::*;
  logic clk = 0, rst_n = 0;
  row_op_e row_op;  logic [4:0] row_bank, row;
  col_op_e col_op;  logic [4:0] col_bank, col;
  logic [127:0] wr_dq, rd_dq;
  logic rd_valid, row_ok, col_ok, violation, s_act, s_hit, bank_err;
  logic [31:0][7:0] open_sec;
  int checks = 0, failures = 0, cyc = 0;

  ppa_channel #(.NUM_BANKS(32), .ROWS(32), .NUM_SECTORS(8)) dut (
    .clk_i(clk), .rst_ni(rst_n), .row_op_i(row_op), .row_bank_i(row_bank), .row_i(row),
    .col_op_i(col_op), .col_bank_i(col_bank), .col_i(col), .wr_dq_i(wr_dq),
    .rd_dq_o(rd_dq), .rd_valid_o(rd_valid), .row_ok_o(row_ok), .col_ok_o(col_ok),
    .violation_o(violation), .sector_act_o(s_act), .sector_hit_o(s_hit),
    .bank_err_o(bank_err), .open_sectors_o(open_sec));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic [255:0] data [4][8];
  logic [127:0] rd_exp [int], wr_drv [int];
  int n_valid_run = 0, best_run = 0, n_act = 0;
  int flag_cycle = -1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  always @(posedge clk) if (rst_n) begin
    #2;
    if (rd_exp.exists(cyc)) begin
      chk(rd_valid && rd_dq === rd_exp[cyc], "read burst");
      rd_exp.delete(cyc);
    end else chk(!rd_valid && rd_dq === '0, "DQ idle");
    n_valid_run = rd_valid ? n_valid_run + 1 : 0;
    if (n_valid_run > best_run) best_run = n_valid_run;
    if (s_act) n_act++;
    chk(violation == (cyc == flag_cycle), "violation flag");
    chk(bank_err == (cyc == flag_cycle), "bank error flag");
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row_op = ROW_NOP; col_op = COL_NOP; row_bank = 0; row = 0; col_bank = 0; col = 0;
    wr_dq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 4; b++) begin
      @(negedge clk); row_op = ROW_ACT; row_bank = 5'(b); row = 5'(b + 9);
      #1 chk(row_ok, "ACT legal");
      @(negedge clk); row_op = ROW_NOP;
    end
    repeat (8) @(negedge clk);
    // writes: columns 0..7 of each bank, round-robin every 2 cycles
    for (int i = 0; i < 32; i++) begin
      int b, c;
      b = i % 4; c = i / 4;
      for (int k = 0; k < 8; k++) data[b][c][k*32 +: 32] = $urandom;
      col_op = COL_WR; col_bank = 5'(b); col = 5'(c * 4 + (c % 4));   // spread over sectors
      wr_drv[cyc + 10] = data[b][c][127:0];
      wr_drv[cyc + 11] = data[b][c][255:128];
      #1 chk(col_ok, "WR legal");
      wr_dq = wr_drv.exists(cyc) ? wr_drv[cyc] : '1;
      @(negedge clk); col_op = COL_NOP;
      wr_dq = wr_drv.exists(cyc) ? wr_drv[cyc] : '1;
      @(negedge clk);
    end
    repeat (24) begin wr_dq = wr_drv.exists(cyc) ? wr_drv[cyc] : '1; @(negedge clk); end
    // reads: same order, every 2 cycles
    for (int i = 0; i < 32; i++) begin
      int b, c;
      b = i % 4; c = i / 4;
      col_op = COL_RD; col_bank = 5'(b); col = 5'(c * 4 + (c % 4));
      rd_exp[cyc + 26] = data[b][c][127:0];
      rd_exp[cyc + 27] = data[b][c][255:128];
      #1 chk(col_ok, "RD legal");
      @(negedge clk); col_op = COL_NOP;
      @(negedge clk);
    end
    // a same-bank read 4 cycles after the previous one is refused (probe only)
    @(negedge clk);
    col_op = COL_RD; col_bank = 5'(3); col = 0;
    #1 chk(!col_ok, "same-bank read 4 cycles later refused");
    col_op = COL_NOP;
    // a read to a closed bank is refused, and flagged when sent anyway
    @(negedge clk);
    col_op = COL_RD; col_bank = 5'(7); col = 0;
    #1 chk(!col_ok, "read to closed bank refused");
    flag_cycle = cyc + 1;
    @(negedge clk); col_op = COL_NOP;
    repeat (40) @(negedge clk);
    chk(best_run >= 64, $sformatf("bus busy for 64 cycles in a row (got %0d)", best_run));
    chk(n_act == 32, $sformatf("each written column opened a new sector (got %0d)", n_act));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
