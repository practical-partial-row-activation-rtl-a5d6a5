// ppa_bank: one HBM2 bank with partial row activation and delayed activation.
//
// Delayed activation: an ACT only decodes and buffers the row address (row_q) and raises
// the bank's global wordline enable; no cells are sensed yet, which is why ACT-to-column
// spacing drops to tRCD/2. The activation itself happens inside each column command:
// sector_decoder picks the sector that holds the column, and if that sector's bit in the
// activation bit vector (valid_bit_latch) is clear, the bit is set, which through the
// wordline AND gates (wordline_gate) raises the local wordlines of that sector only
// (sector_act_o pulses). A column command to an already activated sector reuses it
// (sector_hit_o pulses). PRE clears the vector and closes the row.
//
// The atom then moves over the 32-bit narrow path (narrow_fetch_path, 8 cycles) between
// the sector (mat_array) and the DQ burst logic (dq_burst_io). The interface keeps fixed
// latencies, so every column command pays the activation window whether or not the
// sector was already open:
//   RD in cycle c: activation window c+1..c+T_ACT_DELAY, fetch issued from c+T_ACT_DELAY+2,
//                  atom buffered (atom_fifo), rd_dq_o = {D1,D0} in c+T_RL, {D3,D2} in c+T_RL+1.
//   WR in cycle c: wr_dq_i must carry {D1,D0} in c+T_WL and {D3,D2} in c+T_WL+1; the atom
//                  is written into the sector 32 bits per cycle from c+T_WL+3.
// Column commands to this bank must be at least T_CCD_BANK (8) cycles apart, ACT to column
// at least T_RCD_PPA, column RD to PRE at least T_RTP_PPA (see channel_timing_checker).
// err_o pulses for a column command to a closed bank, an ACT to an open bank, or a PRE
// and a column command to this bank in the same cycle.
//
// The structure (buffered row address, per-sector valid bits, AND-gated local wordlines,
// 32-bit narrow path, +6 and +8 cycle latencies) follows the design description; the
// pipeline that schedules it, the atom buffer and the error flags are this design's own.
module ppa_bank #(
  parameter int unsigned ROWS        = 32,
  parameter int unsigned NUM_SECTORS = 8
) (
  input  logic                                clk_i,
  input  logic                                rst_ni,
  input  ppa_pkg::row_op_e                    row_op_i,   // already decoded for this bank
  input  logic [$clog2(ROWS)-1:0]             row_i,
  input  ppa_pkg::col_op_e                    col_op_i,   // already decoded for this bank
  input  logic [ppa_pkg::COL_BITS-1:0]        col_i,
  input  logic [ppa_pkg::DQ_CLK_BITS-1:0]     wr_dq_i,
  output logic [ppa_pkg::DQ_CLK_BITS-1:0]     rd_dq_o,
  output logic                                rd_valid_o,
  output logic                                sector_act_o,
  output logic                                sector_hit_o,
  output logic [NUM_SECTORS-1:0]              valid_o,
  output logic                                row_open_o,
  output logic                                err_o
);
  import ppa_pkg::*;

  localparam int unsigned SEC_BITS  = $clog2(NUM_SECTORS);
  localparam int unsigned CIS_BITS  = COL_BITS - SEC_BITS;            // column within sector
  localparam int unsigned WORDS     = ROW_BYTES * 8 / NUM_SECTORS / FETCH_BITS;
  localparam int unsigned WORD_BITS = $clog2(WORDS);
  // pipeline taps (stage k holds a command issued k+1 cycles ago)
  localparam int unsigned K_FETCH   = T_ACT_DELAY;        // read fetch start
  localparam int unsigned K_CAP_LO  = T_WL - 1;           // write data {D1,D0}
  localparam int unsigned K_CAP_HI  = T_WL;               // write data {D3,D2}
  localparam int unsigned K_STORE   = T_WL + 1;           // write store start
  localparam int unsigned K_BURST   = T_RL - 2;           // read burst load
  localparam int unsigned STAGES    = ((K_BURST > K_STORE) ? K_BURST : K_STORE) + 1;

  typedef struct packed {
    logic                is_rd;
    logic                is_wr;
    logic [SEC_BITS-1:0] sector;
    logic [CIS_BITS-1:0] col;
  } col_desc_t;

  // ------------------------------------------------------------- row buffering (ACT)
  logic [$clog2(ROWS)-1:0] row_q;
  logic                    row_open_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      row_q      <= '0;
      row_open_q <= 1'b0;
    end else if (row_op_i == ROW_ACT) begin
      row_q      <= row_i;
      row_open_q <= 1'b1;
    end else if (row_op_i == ROW_PRE) begin
      row_open_q <= 1'b0;
    end
  end
  assign row_open_o = row_open_q;

  // ------------------------------------------------------------- sector decode and activation
  logic [SEC_BITS-1:0]    sec;
  logic [NUM_SECTORS-1:0] sec_oh;
  logic [CIS_BITS-1:0]    col_in_sec;
  logic                   col_cmd, do_act;
  logic [NUM_SECTORS:0]   lwl;

  sector_decoder #(.NUM_SECTORS(NUM_SECTORS), .COL_BITS(COL_BITS)) u_dec (
    .col_i(col_i), .sector_o(sec), .sector_oh_o(sec_oh), .col_in_sector_o(col_in_sec));

  assign col_cmd = (col_op_i == COL_RD) || (col_op_i == COL_WR);
  assign do_act  = col_cmd && row_open_q && ((valid_o & sec_oh) == '0);

  valid_bit_latch #(.NUM_SECTORS(NUM_SECTORS)) u_valid (
    .clk_i, .rst_ni,
    .clear_i     (row_op_i == ROW_ACT || row_op_i == ROW_PRE),
    .set_i       (do_act),
    .set_sector_i(sec),
    .valid_o     (valid_o));

  wordline_gate #(.NUM_SECTORS(NUM_SECTORS)) u_wl (
    .gwl_i(row_open_q), .valid_i(valid_o), .lwl_o(lwl));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      sector_act_o <= 1'b0;
      sector_hit_o <= 1'b0;
      err_o        <= 1'b0;
    end else begin
      sector_act_o <= do_act;
      sector_hit_o <= col_cmd && row_open_q && !do_act;
      err_o        <= (col_cmd && !row_open_q) ||
                      (row_op_i == ROW_ACT && row_open_q) ||
                      (col_cmd && row_op_i == ROW_PRE);
    end
  end

  // ------------------------------------------------------------- column pipeline
  col_desc_t pipe_q [STAGES];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int k = 0; k < STAGES; k++) pipe_q[k] <= '0;
    end else begin
      pipe_q[0] <= '{is_rd : (col_op_i == COL_RD) && row_open_q,
                     is_wr : (col_op_i == COL_WR) && row_open_q,
                     sector: sec, col: col_in_sec};
      for (int k = 1; k < STAGES; k++) pipe_q[k] <= pipe_q[k-1];
    end
  end

  // ------------------------------------------------------------- narrow path and array
  logic                     start_rd, start_wr;
  logic [SEC_BITS-1:0]      xfer_sec_q;
  logic                     arr_rd, arr_wr;
  logic [WORD_BITS-1:0]     arr_word;
  logic [FETCH_BITS-1:0]    arr_wdata, arr_rdata;
  logic [ATOM_BITS-1:0]     fetched, wr_atom, fifo_atom;
  logic                     fetched_v, fifo_empty, fifo_full;

  assign start_rd = pipe_q[K_FETCH].is_rd;
  assign start_wr = pipe_q[K_STORE].is_wr;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                    xfer_sec_q <= '0;
    else if (start_rd)              xfer_sec_q <= pipe_q[K_FETCH].sector;
    else if (start_wr)              xfer_sec_q <= pipe_q[K_STORE].sector;
  end

  narrow_fetch_path #(.WORD_BITS(WORD_BITS)) u_path (
    .clk_i, .rst_ni,
    .start_rd_i  (start_rd),
    .start_wr_i  (start_wr),
    .col_i       (start_wr ? pipe_q[K_STORE].col : pipe_q[K_FETCH].col),
    .wr_atom_i   (wr_atom),
    .arr_rd_o    (arr_rd),
    .arr_wr_o    (arr_wr),
    .arr_word_o  (arr_word),
    .arr_wdata_o (arr_wdata),
    .arr_rdata_i (arr_rdata),
    .atom_o      (fetched),
    .atom_valid_o(fetched_v),
    .busy_o      ());

  mat_array #(.ROWS(ROWS), .NUM_SECTORS(NUM_SECTORS), .WORDS(WORDS)) u_array (
    .clk_i,
    .lwl_i   (lwl),
    .row_i   (row_q),
    .sector_i(xfer_sec_q),
    .word_i  (arr_word),
    .rd_i    (arr_rd),
    .wr_i    (arr_wr),
    .wdata_i (arr_wdata),
    .rdata_o (arr_rdata));

  atom_fifo #(.WIDTH(ATOM_BITS), .DEPTH(2)) u_fifo (
    .clk_i, .rst_ni,
    .push_i (fetched_v),
    .wdata_i(fetched),
    .pop_i  (pipe_q[K_BURST].is_rd),
    .rdata_o(fifo_atom),
    .empty_o(fifo_empty),
    .full_o (fifo_full));

  dq_burst_io u_io (
    .clk_i, .rst_ni,
    .load_i    (pipe_q[K_BURST].is_rd),
    .atom_i    (fifo_atom),
    .dq_o      (rd_dq_o),
    .dq_valid_o(rd_valid_o),
    .cap_lo_i  (pipe_q[K_CAP_LO].is_wr),
    .cap_hi_i  (pipe_q[K_CAP_HI].is_wr),
    .dq_i      (wr_dq_i),
    .wr_atom_o (wr_atom));

  // read and write transfers must not collide on the narrow path
  assert property (@(posedge clk_i) disable iff (!rst_ni) !(start_rd && start_wr));
endmodule
