// tb_ppa_bank: one PPA bank driven by a randomised, timing-legal command stream.
//
// The testbench keeps its own reference of the bank contents (one 256-bit atom per row
// and column) and its own copy of the activation bit vector, and applies the timing
// numbers of the design directly (ACT->RD/WR 8, same-bank column spacing 8, read
// latency 26, write latency 10, RD->PRE 18, WR->PRE 33, PRE->ACT 16, tRAS 29, tRC 45,
// WR->RD 22, RD->WR 18). It checks
//  - every read burst: both halves, in exactly cycles c+26 and c+27, and nothing else on DQ;
//  - that write data is taken only in cycles c+10 and c+11 (other cycles carry garbage);
//  - a sector activation pulse for the first column command to a sector of an open row,
//    a hit pulse for every later one, and that the bit vector equals the reference;
//  - that precharge empties the vector and that data survives closing and reopening rows;
//  - the error pulse for a column command to a closed bank.
module tb_ppa_bank;
  import ppa_pkg::*;
  localparam int ROWS = 8;
  localparam int RL = 26, WL = 10;

  logic clk = 0, rst_n = 0;
  row_op_e row_op;  logic [2:0] row;
  col_op_e col_op;  logic [4:0] col;
  logic [127:0] wr_dq, rd_dq;
  logic rd_valid, s_act, s_hit, row_open, err;
  logic [7:0] valid;
  int checks = 0, failures = 0, cyc = 0;

  ppa_bank #(.ROWS(ROWS), .NUM_SECTORS(8)) dut (
    .clk_i(clk), .rst_ni(rst_n), .row_op_i(row_op), .row_i(row), .col_op_i(col_op),
    .col_i(col), .wr_dq_i(wr_dq), .rd_dq_o(rd_dq), .rd_valid_o(rd_valid),
    .sector_act_o(s_act), .sector_hit_o(s_hit), .valid_o(valid), .row_open_o(row_open),
    .err_o(err));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic [255:0] ref_mem [ROWS][32];
  logic [127:0] rd_exp [int];     // cycle -> expected read DQ
  logic [127:0] wr_drv [int];     // cycle -> write DQ to drive
  bit           act_exp [int], hit_exp [int], err_exp [int];
  logic [7:0]   ref_valid;
  bit           ref_open;
  int           open_row;
  bit want_pre = 0;
  int t_act = -1000, t_pre = -1000, t_col = -1000, t_rd = -1000, t_wr = -1000;
  int n_rd = 0, n_wr = 0, n_act = 0, n_hit = 0, n_pre = 0, n_err = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // output checks, once per cycle, shortly after the clock edge
  always @(posedge clk) if (rst_n) begin
    #2;
    if (rd_exp.exists(cyc)) begin
      chk(rd_valid && rd_dq === rd_exp[cyc], "read burst data/timing");
      rd_exp.delete(cyc);
    end else
      chk(!rd_valid && rd_dq === '0, "DQ idle");
    chk(s_act == act_exp.exists(cyc), "sector activation pulse");
    chk(s_hit == hit_exp.exists(cyc), "sector hit pulse");
    chk(err == err_exp.exists(cyc), "error pulse");
    chk(valid === ref_valid && row_open == ref_open, "activation bit vector");
  end

  task automatic issue_col(input bit is_wr, input int c);
    int s;
    s = c / 4;
    col_op = is_wr ? COL_WR : COL_RD; col = 5'(c);
    if (!ref_valid[s]) begin act_exp[cyc + 1] = 1; n_act++; end
    else begin hit_exp[cyc + 1] = 1; n_hit++; end
    ref_valid[s] = 1'b1;
    t_col = cyc;
    if (is_wr) begin
      logic [255:0] a;
      for (int k = 0; k < 8; k++) a[k*32 +: 32] = $urandom;
      ref_mem[open_row][c] = a;
      wr_drv[cyc + WL]     = a[127:0];
      wr_drv[cyc + WL + 1] = a[255:128];
      t_wr = cyc; n_wr++;
    end else begin
      rd_exp[cyc + RL]     = ref_mem[open_row][c][127:0];
      rd_exp[cyc + RL + 1] = ref_mem[open_row][c][255:128];
      t_rd = cyc; n_rd++;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row_op = ROW_NOP; col_op = COL_NOP; row = 0; col = 0; wr_dq = '0;
    ref_valid = '0; ref_open = 0; open_row = 0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < 32; c++) ref_mem[r][c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // zero-initialise the bank through its own write path, row by row
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      row_op = ROW_ACT; row = 3'(r); ref_open = 1; ref_valid = '0; open_row = r; t_act = cyc;
      @(negedge clk); row_op = ROW_NOP;
      for (int c = 0; c < 32; c++) begin
        while (cyc - t_col < 8 || cyc - t_act < 8) @(negedge clk);
        col_op = COL_WR; col = 5'(c);
        if (!ref_valid[c / 4]) act_exp[cyc + 1] = 1; else hit_exp[cyc + 1] = 1;
        ref_valid[c / 4] = 1; t_col = cyc; t_wr = cyc;
        wr_drv[cyc + WL] = '0; wr_drv[cyc + WL + 1] = '0;
        @(negedge clk); col_op = COL_NOP;
      end
      while (cyc - t_wr < 33 || cyc - t_act < 29) @(negedge clk);
      row_op = ROW_PRE; ref_open = 0; ref_valid = '0; t_pre = cyc;
      @(negedge clk); row_op = ROW_NOP;
      while (cyc - t_pre < 16 || cyc - t_act < 45) @(negedge clk);
    end
    // randomised legal traffic
    for (int i = 0; i < 6000; i++) begin
      row_op = ROW_NOP; col_op = COL_NOP;
      if (!ref_open) begin
        if (cyc - t_pre >= 16 && cyc - t_act >= 45 && $urandom_range(0, 3) == 0) begin
          open_row = $urandom_range(0, ROWS - 1);
          row_op = ROW_ACT; row = 3'(open_row); ref_open = 1; ref_valid = '0;
          t_act = cyc;
        end
      end else begin
        int pick, c;
        bit col_legal;
        pick = $urandom_range(0, 99);
        // mostly sequential columns so that sectors are reused
        c = (pick < 60) ? (int'(col) + 1) % 32 : $urandom_range(0, 31);
        col_legal = cyc - t_act >= 8 && cyc - t_col >= 8;
        if (pick >= 98) want_pre = 1;
        if (want_pre) begin
          if (cyc - t_act >= 29 && cyc - t_rd >= 18 && cyc - t_wr >= 33) begin
            row_op = ROW_PRE; ref_open = 0; ref_valid = '0; t_pre = cyc; n_pre++;
            want_pre = 0;
          end
        end
        else if (pick < 45 && col_legal && cyc - t_wr >= 22) issue_col(0, c);
        else if (pick < 80 && col_legal && cyc - t_rd >= 18) issue_col(1, c);
      end
      wr_dq = wr_drv.exists(cyc) ? wr_drv[cyc] : {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      wr_drv.delete(cyc - 1);
    end
    row_op = ROW_NOP; col_op = COL_NOP;
    repeat (40) begin
      wr_dq = wr_drv.exists(cyc) ? wr_drv[cyc] : '0;
      @(negedge clk);
    end
    // column command to a closed bank is flagged
    while (cyc - t_rd < 18 || cyc - t_wr < 33 || cyc - t_act < 29) @(negedge clk);
    if (ref_open) begin
      row_op = ROW_PRE; ref_open = 0; ref_valid = '0; t_pre = cyc;
      @(negedge clk); row_op = ROW_NOP;
    end
    col_op = COL_RD; col = 0; err_exp[cyc + 1] = 1; n_err++;
    @(negedge clk); col_op = COL_NOP;
    repeat (40) @(negedge clk);
    chk(rd_exp.size() == 0, "all expected bursts seen");
    chk(n_rd > 50 && n_wr > 50 && n_act > 50 && n_hit > 50 && n_pre > 10, "traffic mix");
    $display("reads %0d writes %0d activations %0d hits %0d precharges %0d",
             n_rd, n_wr, n_act, n_hit, n_pre);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
