// tb_ppa_hbm2_top: end-to-end test of the whole stack at its default size
// (8 channels x 32 banks), driven by a small open-page memory controller model.
//
// Each channel gets its own request stream: first a sequential phase (whole rows written
// and read back column by column, the access pattern of FC layers and of lowered
// convolutions), then a random phase over several banks and rows that causes row
// conflicts. The controller keeps a window of the oldest requests, issues a column
// command for any of them whose row is open and a row command (ACT, or PRE on a row
// conflict) for the oldest request of a bank, and relies on the stack's own row_ok/col_ok
// to hold commands back; a held-back command counts as a stall.
//
// Checked independently of the RTL: read data against a reference memory, read bursts in
// exactly cycles c+26 and c+27, write data driven only in cycles c+10 and c+11, sector
// activation / hit pulses against a reference copy of every bank's activation bit vector,
// that violation and error flags stay low, and that one deliberately illegal command
// (a read to a closed bank) raises both. Every mechanism must occur at least once:
// sector activation, sector hit, row conflict precharge, a command held back by the
// timing rules, back-to-back bursts on one channel from different banks, writes, reads,
// and the illegal-command report. The activated fraction of each opened row (the
// activation energy relative to full-row activation) is printed per phase.
module tb_ppa_hbm2_top;
  import ppa_pkg::*;
  localparam int NCH = 8, NB = 32, NROWS = 32, NS = 8;
  localparam int RL = 26, WL = 10, WIN = 4;
  localparam int REQS_SEQ = 256, REQS_RND = 160;

  logic clk = 0, rst_n = 0;
  row_op_e      row_op   [NCH];
  logic [4:0]   row_bank [NCH];
  logic [4:0]   row      [NCH];
  col_op_e      col_op   [NCH];
  logic [4:0]   col_bank [NCH];
  logic [4:0]   col      [NCH];
  logic [127:0] wr_dq    [NCH];
  logic [127:0] rd_dq    [NCH];
  logic [NCH-1:0] rd_valid, row_ok, col_ok, violation, s_act, s_hit, bank_err;
  logic [NB-1:0][NS-1:0] open_sec [NCH];

  ppa_hbm2_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .row_op_i(row_op), .row_bank_i(row_bank), .row_i(row),
    .col_op_i(col_op), .col_bank_i(col_bank), .col_i(col),
    .wr_dq_i(wr_dq), .rd_dq_o(rd_dq), .rd_valid_o(rd_valid),
    .row_ok_o(row_ok), .col_ok_o(col_ok), .violation_o(violation),
    .sector_act_o(s_act), .sector_hit_o(s_hit), .bank_err_o(bank_err),
    .open_sectors_o(open_sec));

  always #50 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {int bank; int row; int col; bit wr;} req_t;
  req_t queue_q [NCH][$];

  logic [255:0] ref_mem [int];            // key: ((ch*NB+bank)*NROWS+row)*32+col
  logic [127:0] rd_exp  [NCH][int];
  logic [127:0] wr_drv  [NCH][int];
  bit           act_exp [NCH][int], hit_exp [NCH][int], flag_exp [NCH][int];
  logic [NS-1:0] ref_valid [NCH][NB];
  int            open_row  [NCH][NB];     // -1: closed
  int checks = 0, failures = 0;
  int n_act = 0, n_hit = 0, n_conflict = 0, n_stall = 0, n_b2b = 0, n_rd = 0, n_wr = 0;
  int n_flag = 0, n_rowact = 0;
  int ph_rowact [2], ph_secact [2];
  int phase = 0;

  function automatic int key(int ch, int b, int r, int c);
    return ((ch * NB + b) * NROWS + r) * 32 + c;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // ---------------------------------------------------------------- output monitor
  always @(posedge clk) if (rst_n) begin
    #2;
    for (int ch = 0; ch < NCH; ch++) begin
      if (rd_exp[ch].exists(cyc)) begin
        chk(rd_valid[ch] && rd_dq[ch] === rd_exp[ch][cyc], $sformatf("ch%0d read burst", ch));
        if (rd_exp[ch].exists(cyc - 2) || rd_exp[ch].exists(cyc + 2)) n_b2b++;
        rd_exp[ch].delete(cyc);
      end else
        chk(!rd_valid[ch] && rd_dq[ch] === '0, $sformatf("ch%0d DQ idle", ch));
      chk(s_act[ch] == act_exp[ch].exists(cyc), $sformatf("ch%0d activation pulse", ch));
      chk(s_hit[ch] == hit_exp[ch].exists(cyc), $sformatf("ch%0d hit pulse", ch));
      chk(violation[ch] == flag_exp[ch].exists(cyc), $sformatf("ch%0d violation flag", ch));
      chk(bank_err[ch] == flag_exp[ch].exists(cyc), $sformatf("ch%0d bank error flag", ch));
      if (violation[ch] && flag_exp[ch].exists(cyc)) n_flag++;
      act_exp[ch].delete(cyc); hit_exp[ch].delete(cyc); flag_exp[ch].delete(cyc);
      for (int b = 0; b < NB; b++)
        if (open_sec[ch][b] !== ref_valid[ch][b]) begin
          chk(0, $sformatf("ch%0d bank%0d bit vector", ch, b));
        end
    end
  end

  // ---------------------------------------------------------------- request streams
  task automatic make_requests();
    for (int ch = 0; ch < NCH; ch++) begin
      // sequential phase: one row in each of four banks, interleaved column by column
      // across the banks; every column is written, then all are read back
      for (int i = 0; i < REQS_SEQ; i++) begin
        req_t q;
        q.bank = (ch + i % 4) % NB;
        q.row  = (ch * 3) % NROWS;
        q.col  = (i / 4) % 32;
        q.wr   = i < REQS_SEQ / 2;
        queue_q[ch].push_back(q);
      end
    end
  endtask

  task automatic make_random_requests();
    for (int ch = 0; ch < NCH; ch++)
      for (int i = 0; i < REQS_RND; i++) begin
        req_t q;
        q.bank = $urandom_range(0, 5);
        q.row  = $urandom_range(0, 3);
        q.col  = $urandom_range(0, 31);
        q.wr   = !ref_mem.exists(key(ch, q.bank, q.row, q.col)) || ($urandom_range(0, 2) == 0);
        // a read of something never written becomes a write of it
        queue_q[ch].push_back(q);
      end
  endtask

  // ---------------------------------------------------------------- controller
  task automatic do_col(int ch, req_t q);
    int s;
    s = q.col / 4;
    if (!ref_valid[ch][q.bank][s]) begin act_exp[ch][cyc + 1] = 1; n_act++; ph_secact[phase]++; end
    else begin hit_exp[ch][cyc + 1] = 1; n_hit++; end
    ref_valid[ch][q.bank][s] = 1'b1;
    if (q.wr || !ref_mem.exists(key(ch, q.bank, q.row, q.col))) begin
      logic [255:0] a;
      for (int k = 0; k < 8; k++) a[k*32 +: 32] = $urandom;
      ref_mem[key(ch, q.bank, q.row, q.col)] = a;
      wr_drv[ch][cyc + WL]     = a[127:0];
      wr_drv[ch][cyc + WL + 1] = a[255:128];
      col_op[ch] = COL_WR; n_wr++;
    end else begin
      rd_exp[ch][cyc + RL]     = ref_mem[key(ch, q.bank, q.row, q.col)][127:0];
      rd_exp[ch][cyc + RL + 1] = ref_mem[key(ch, q.bank, q.row, q.col)][255:128];
      col_op[ch] = COL_RD; n_rd++;
    end
  endtask

  task automatic control_cycle(input bit inject);
    int   col_pick [NCH], row_pick [NCH];
    bit   wanted_col [NCH], wanted_row [NCH];
    for (int ch = 0; ch < NCH; ch++) begin
      row_op[ch] = ROW_NOP; col_op[ch] = COL_NOP;
      col_pick[ch] = -1; row_pick[ch] = -1; wanted_col[ch] = 0; wanted_row[ch] = 0;
    end
    // column candidates, one probe per window slot, all channels at once
    for (int k = 0; k < WIN; k++) begin
      for (int ch = 0; ch < NCH; ch++)
        if (col_pick[ch] < 0 && k < queue_q[ch].size()) begin
          req_t q = queue_q[ch][k];
          if (open_row[ch][q.bank] == q.row) begin
            wanted_col[ch] = 1;
            col_op[ch] = q.wr ? COL_WR : COL_RD; col_bank[ch] = 5'(q.bank); col[ch] = 5'(q.col);
          end
        end
      #1;
      for (int ch = 0; ch < NCH; ch++)
        if (col_pick[ch] < 0 && col_op[ch] != COL_NOP) begin
          if (col_ok[ch]) col_pick[ch] = k;
          else col_op[ch] = COL_NOP;
        end
    end
    // row candidates: the oldest request of each bank in the window
    for (int k = 0; k < WIN; k++) begin
      for (int ch = 0; ch < NCH; ch++)
        if (row_pick[ch] < 0 && k < queue_q[ch].size() && k != col_pick[ch]) begin
          req_t q = queue_q[ch][k];
          bit older_same_bank = 0;
          for (int j = 0; j < k; j++) if (queue_q[ch][j].bank == q.bank) older_same_bank = 1;
          if (!older_same_bank && open_row[ch][q.bank] != q.row) begin
            wanted_row[ch] = 1;
            row_op[ch] = (open_row[ch][q.bank] < 0) ? ROW_ACT : ROW_PRE;
            row_bank[ch] = 5'(q.bank); row[ch] = 5'(q.row);
          end
        end
      #1;
      for (int ch = 0; ch < NCH; ch++)
        if (row_pick[ch] < 0 && row_op[ch] != ROW_NOP) begin
          if (row_ok[ch] && col_ok[ch]) row_pick[ch] = k;
          else row_op[ch] = ROW_NOP;
        end
    end
    // commit
    for (int ch = 0; ch < NCH; ch++) begin
      if ((wanted_col[ch] && col_pick[ch] < 0) || (wanted_row[ch] && row_pick[ch] < 0)) n_stall++;
      if (col_pick[ch] >= 0) begin
        do_col(ch, queue_q[ch][col_pick[ch]]);
        queue_q[ch].delete(col_pick[ch]);
      end
      if (row_op[ch] == ROW_ACT) begin
        open_row[ch][row_bank[ch]] = int'(row[ch]);
        ref_valid[ch][row_bank[ch]] = '0;
        n_rowact++; ph_rowact[phase]++;
      end else if (row_op[ch] == ROW_PRE) begin
        open_row[ch][row_bank[ch]] = -1;
        ref_valid[ch][row_bank[ch]] = '0;
        n_conflict++;
      end
    end
    if (inject && col_op[0] == COL_NOP && row_op[0] == ROW_NOP) begin
      col_op[0] = COL_RD; col_bank[0] = 5'(NB - 1); col[0] = 0;   // bank 31 is never opened
      flag_exp[0][cyc + 1] = 1;
    end
    for (int ch = 0; ch < NCH; ch++)
      wr_dq[ch] = wr_drv[ch].exists(cyc) ? wr_drv[ch][cyc] : {$urandom, $urandom, $urandom, $urandom};
  endtask

  function automatic bit all_idle();
    for (int ch = 0; ch < NCH; ch++) if (queue_q[ch].size() != 0) return 0;
    return 1;
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit injected = 0;
    for (int ch = 0; ch < NCH; ch++) begin
      row_op[ch] = ROW_NOP; col_op[ch] = COL_NOP; row_bank[ch] = 0; row[ch] = 0;
      col_bank[ch] = 0; col[ch] = 0; wr_dq[ch] = '0;
      for (int b = 0; b < NB; b++) begin ref_valid[ch][b] = '0; open_row[ch][b] = -1; end
    end
    ph_rowact[0] = 0; ph_rowact[1] = 0; ph_secact[0] = 0; ph_secact[1] = 0;
    make_requests();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      phase = p;
      if (p == 1) make_random_requests();
      while (!all_idle()) begin
        @(negedge clk);
        control_cycle(!injected && p == 1 && cyc > 100);
        if (col_op[0] == COL_RD && col_bank[0] == 5'(NB - 1)) injected = 1;
      end
    end
    @(negedge clk);
    for (int ch = 0; ch < NCH; ch++) begin row_op[ch] = ROW_NOP; col_op[ch] = COL_NOP; end
    repeat (RL + 4) begin
      @(negedge clk);
      for (int ch = 0; ch < NCH; ch++)
        wr_dq[ch] = wr_drv[ch].exists(cyc) ? wr_drv[ch][cyc] : '0;
    end
    for (int ch = 0; ch < NCH; ch++) chk(rd_exp[ch].size() == 0, "all bursts returned");
    $display("reads %0d writes %0d sector activations %0d sector hits %0d", n_rd, n_wr, n_act, n_hit);
    $display("row activates %0d row-conflict precharges %0d stalls %0d back-to-back bursts %0d flagged %0d",
             n_rowact, n_conflict, n_stall, n_b2b, n_flag);
    for (int p = 0; p < 2; p++)
      $display("phase %0d: %0d of %0d sectors activated (%0d%% of full-row activation)",
               p, ph_secact[p], ph_rowact[p] * NS, 100 * ph_secact[p] / (ph_rowact[p] * NS));
    chk(n_act > 0,      "mechanism: sector activation");
    chk(n_hit > 0,      "mechanism: sector hit");
    chk(n_conflict > 0, "mechanism: row conflict precharge");
    chk(n_stall > 0,    "mechanism: timing hold");
    chk(n_b2b > 0,      "mechanism: back-to-back bursts");
    chk(n_rd > 0 && n_wr > 0, "mechanism: reads and writes");
    chk(n_flag == 1,    "mechanism: illegal command reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
