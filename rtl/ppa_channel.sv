// ppa_channel: one HBM2 channel (pseudo-channel data path) built from PPA banks.
//
// The channel has separate row (ACT/PRE) and column (RD/WR) command buses, both decoded
// here by bank address and steered to one of NUM_BANKS (32) ppa_bank instances. Write
// data on wr_dq_i is broadcast; only the bank with a write in flight samples it, T_WL
// cycles after its WR. Read bursts of all banks are OR-merged onto rd_dq_o: the spacing
// rules keep at most one bank driving at a time (a bank drives zeros while idle).
// channel_timing_checker watches the same command buses and reports whether the
// presented commands obey the PPA timing rules (row_ok_o, col_ok_o, violation_o).
//
// The banks-per-channel count and the data widths follow the design description; the
// OR-merge of read data and the status outputs are this design's own. Event outputs
// (sector_act_o, sector_hit_o, bank_err_o) are the OR of the per-bank one-cycle pulses,
// one cycle after the command. open_sectors_o is the activation bit vector of each bank.
module ppa_channel #(
  parameter int unsigned NUM_BANKS   = 32,
  parameter int unsigned ROWS        = 32,
  parameter int unsigned NUM_SECTORS = 8
) (
  input  logic                                   clk_i,
  input  logic                                   rst_ni,
  input  ppa_pkg::row_op_e                       row_op_i,
  input  logic [$clog2(NUM_BANKS)-1:0]           row_bank_i,
  input  logic [$clog2(ROWS)-1:0]                row_i,
  input  ppa_pkg::col_op_e                       col_op_i,
  input  logic [$clog2(NUM_BANKS)-1:0]           col_bank_i,
  input  logic [ppa_pkg::COL_BITS-1:0]           col_i,
  input  logic [ppa_pkg::DQ_CLK_BITS-1:0]        wr_dq_i,
  output logic [ppa_pkg::DQ_CLK_BITS-1:0]        rd_dq_o,
  output logic                                   rd_valid_o,
  output logic                                   row_ok_o,
  output logic                                   col_ok_o,
  output logic                                   violation_o,
  output logic                                   sector_act_o,
  output logic                                   sector_hit_o,
  output logic                                   bank_err_o,
  output logic [NUM_BANKS-1:0][NUM_SECTORS-1:0]  open_sectors_o
);
  import ppa_pkg::*;

  logic [DQ_CLK_BITS-1:0] b_dq   [NUM_BANKS];
  logic [NUM_BANKS-1:0]   b_valid, b_act, b_hit, b_err, b_open, chk_open;

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    row_op_e r_op;
    col_op_e c_op;
    assign r_op = (row_bank_i == b) ? row_op_i : ROW_NOP;
    assign c_op = (col_bank_i == b) ? col_op_i : COL_NOP;

    ppa_bank #(.ROWS(ROWS), .NUM_SECTORS(NUM_SECTORS)) u_bank (
      .clk_i, .rst_ni,
      .row_op_i    (r_op),
      .row_i       (row_i),
      .col_op_i    (c_op),
      .col_i       (col_i),
      .wr_dq_i     (wr_dq_i),
      .rd_dq_o     (b_dq[b]),
      .rd_valid_o  (b_valid[b]),
      .sector_act_o(b_act[b]),
      .sector_hit_o(b_hit[b]),
      .valid_o     (open_sectors_o[b]),
      .row_open_o  (b_open[b]),
      .err_o       (b_err[b]));
  end

  always_comb begin
    rd_dq_o = '0;
    for (int b = 0; b < NUM_BANKS; b++) rd_dq_o |= b_dq[b];
  end
  assign rd_valid_o   = |b_valid;
  assign sector_act_o = |b_act;
  assign sector_hit_o = |b_hit;
  assign bank_err_o   = |b_err;

  channel_timing_checker #(.NUM_BANKS(NUM_BANKS)) u_timing (
    .clk_i, .rst_ni,
    .row_op_i, .row_bank_i, .col_op_i, .col_bank_i,
    .row_ok_o, .col_ok_o, .violation_o,
    .open_o(chk_open));

  // the timing rules keep read bursts of different banks from overlapping
  assert property (@(posedge clk_i) disable iff (!rst_ni) $onehot0(b_valid));
  // the banks and the checker track the same open rows
  assert property (@(posedge clk_i) disable iff (!rst_ni) b_open == chk_open);
endmodule
