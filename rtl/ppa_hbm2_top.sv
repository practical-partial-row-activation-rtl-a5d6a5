// ppa_hbm2_top: an HBM2 stack whose banks use practical partial row activation.
//
// The stack is NUM_CHANNELS (8) independent channels, each with its own row and column
// command buses and DQ, and each made of NUM_BANKS (32) PPA banks (4-high stack, 16 banks
// per channel per slice group). Every port is an array indexed by channel; channel c is
// one ppa_channel instance. The command interface is the standard one: ACT, PRE, RD, WR
// with bank, row and column addresses. What changes for the controller is only the
// timing: tRCD halves, read latency becomes T_RL (26) and write latency T_WL (10), the
// same-bank column spacing grows to tCCD+6, and tWR/tWTR/tRTP grow (see ppa_pkg).
// The per-channel rd_dq_o word carries two 64-bit beats per clock.
//
// Channel and bank counts follow the design description; ROWS per bank is this design's
// own size choice (the description gives no capacity). Base-die parts (PHY, TSV I/O,
// test pads) are not part of this RTL: their signals are the ports below.
module ppa_hbm2_top #(
  parameter int unsigned NUM_CHANNELS = 8,
  parameter int unsigned NUM_BANKS    = 32,
  parameter int unsigned ROWS         = 32,
  parameter int unsigned NUM_SECTORS  = 8
) (
  input  logic                                  clk_i,
  input  logic                                  rst_ni,
  input  ppa_pkg::row_op_e                      row_op_i    [NUM_CHANNELS],
  input  logic [$clog2(NUM_BANKS)-1:0]          row_bank_i  [NUM_CHANNELS],
  input  logic [$clog2(ROWS)-1:0]               row_i       [NUM_CHANNELS],
  input  ppa_pkg::col_op_e                      col_op_i    [NUM_CHANNELS],
  input  logic [$clog2(NUM_BANKS)-1:0]          col_bank_i  [NUM_CHANNELS],
  input  logic [ppa_pkg::COL_BITS-1:0]          col_i       [NUM_CHANNELS],
  input  logic [ppa_pkg::DQ_CLK_BITS-1:0]       wr_dq_i     [NUM_CHANNELS],
  output logic [ppa_pkg::DQ_CLK_BITS-1:0]       rd_dq_o     [NUM_CHANNELS],
  output logic [NUM_CHANNELS-1:0]               rd_valid_o,
  output logic [NUM_CHANNELS-1:0]               row_ok_o,
  output logic [NUM_CHANNELS-1:0]               col_ok_o,
  output logic [NUM_CHANNELS-1:0]               violation_o,
  output logic [NUM_CHANNELS-1:0]               sector_act_o,
  output logic [NUM_CHANNELS-1:0]               sector_hit_o,
  output logic [NUM_CHANNELS-1:0]               bank_err_o,
  output logic [NUM_BANKS-1:0][NUM_SECTORS-1:0] open_sectors_o [NUM_CHANNELS]
);
  for (genvar c = 0; c < NUM_CHANNELS; c++) begin : g_ch
    ppa_channel #(.NUM_BANKS(NUM_BANKS), .ROWS(ROWS), .NUM_SECTORS(NUM_SECTORS)) u_ch (
      .clk_i, .rst_ni,
      .row_op_i      (row_op_i[c]),
      .row_bank_i    (row_bank_i[c]),
      .row_i         (row_i[c]),
      .col_op_i      (col_op_i[c]),
      .col_bank_i    (col_bank_i[c]),
      .col_i         (col_i[c]),
      .wr_dq_i       (wr_dq_i[c]),
      .rd_dq_o       (rd_dq_o[c]),
      .rd_valid_o    (rd_valid_o[c]),
      .row_ok_o      (row_ok_o[c]),
      .col_ok_o      (col_ok_o[c]),
      .violation_o   (violation_o[c]),
      .sector_act_o  (sector_act_o[c]),
      .sector_hit_o  (sector_hit_o[c]),
      .bank_err_o    (bank_err_o[c]),
      .open_sectors_o(open_sectors_o[c]));
  end
endmodule
