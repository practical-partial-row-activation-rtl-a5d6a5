// channel_timing_checker: the command spacing rules of one HBM2 channel with partial row
// activation, as a memory controller must obey them.
//
// For the row command (ACT/PRE) and the column command (RD/WR) presented in the current
// cycle, row_ok_o and col_ok_o say combinationally whether they obey every rule; a
// controller may use them to hold a command back. violation_o pulses one cycle after a
// command that broke a rule was presented. A NOP is always legal.
//
// Rules (cycles at 1000 MHz; "PPA" marks values changed by partial activation):
//   ACT: bank closed, >= T_RP since its PRE, >= T_RC since its ACT, >= T_RRD since any ACT
//   PRE: >= T_RAS since ACT, >= T_RTP_PPA since its last RD,
//        >= T_WL+BURST_CYCLES+T_WR_PPA since its last WR (PRE to a closed bank is a no-op)
//   RD/WR: bank open and not precharged in the same cycle, >= T_RCD_PPA (tRCD/2) since ACT,
//        >= T_CCD_BANK (tCCD+6) since the last column command to the same bank,
//        >= T_CCD_S since any column command of the channel
//   RD:  >= T_WL+BURST_CYCLES+T_WTR_PPA since the last WR of the channel
//   WR:  >= T_RL+BURST_CYCLES-T_WL since the last RD of the channel (DQ turnaround)
// The halved tRCD, the same-bank tCCD of tCCD+6 and the +6 on tWR/tWTR/tRTP follow the
// design description; the write turnaround rule, the baseline tRTP/tWTR and the extra 8
// on tRTP are this design's own (see ppa_pkg). Bank groups (tCCD_L) are not modelled.
// Cycle counters saturate, so any gap longer than the longest rule counts as "long ago".
module channel_timing_checker #(
  parameter int unsigned NUM_BANKS = 32
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  ppa_pkg::row_op_e              row_op_i,
  input  logic [$clog2(NUM_BANKS)-1:0]  row_bank_i,
  input  ppa_pkg::col_op_e              col_op_i,
  input  logic [$clog2(NUM_BANKS)-1:0]  col_bank_i,
  output logic                          row_ok_o,
  output logic                          col_ok_o,
  output logic                          violation_o,
  output logic [NUM_BANKS-1:0]          open_o
);
  import ppa_pkg::*;

  localparam int unsigned CW  = 7;
  localparam logic [CW-1:0] SAT = '1;
  localparam int unsigned T_PRE_AFTER_WR = T_WL + BURST_CYCLES + T_WR_PPA;
  localparam int unsigned T_RD_AFTER_WR  = T_WL + BURST_CYCLES + T_WTR_PPA;
  localparam int unsigned T_WR_AFTER_RD  = T_RL + BURST_CYCLES - T_WL;

  typedef struct packed {
    logic [CW-1:0] act, pre, rd, wr, col;
  } bank_age_t;

  bank_age_t     age_q [NUM_BANKS];
  logic [CW-1:0] ch_act_q, ch_col_q, ch_rd_q, ch_wr_q;
  logic [NUM_BANKS-1:0] open_q;

  function automatic logic [CW-1:0] inc(input logic [CW-1:0] v);
    return (v == SAT) ? SAT : v + CW'(1);
  endfunction

  bank_age_t rb, cb;
  assign rb     = age_q[row_bank_i];
  assign cb     = age_q[col_bank_i];
  assign open_o = open_q;

  always_comb begin
    unique case (row_op_i)
      ROW_ACT: row_ok_o = !open_q[row_bank_i] && rb.pre >= CW'(T_RP) && rb.act >= CW'(T_RC) &&
                          ch_act_q >= CW'(T_RRD);
      ROW_PRE: row_ok_o = !open_q[row_bank_i] ||
                          (rb.act >= CW'(T_RAS) && rb.rd >= CW'(T_RTP_PPA) &&
                           rb.wr >= CW'(T_PRE_AFTER_WR));
      default: row_ok_o = 1'b1;
    endcase
    if (col_op_i == COL_NOP) begin
      col_ok_o = 1'b1;
    end else begin
      col_ok_o = open_q[col_bank_i] &&
                 !(row_op_i == ROW_PRE && row_bank_i == col_bank_i) &&
                 cb.act >= CW'(T_RCD_PPA) && cb.col >= CW'(T_CCD_BANK) &&
                 ch_col_q >= CW'(T_CCD_S);
      if (col_op_i == COL_RD) col_ok_o = col_ok_o && ch_wr_q >= CW'(T_RD_AFTER_WR);
      else                    col_ok_o = col_ok_o && ch_rd_q >= CW'(T_WR_AFTER_RD);
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int b = 0; b < NUM_BANKS; b++) age_q[b] <= '{SAT, SAT, SAT, SAT, SAT};
      ch_act_q    <= SAT;
      ch_col_q    <= SAT;
      ch_rd_q     <= SAT;
      ch_wr_q     <= SAT;
      open_q      <= '0;
      violation_o <= 1'b0;
    end else begin
      for (int b = 0; b < NUM_BANKS; b++) begin
        age_q[b].act <= inc(age_q[b].act);
        age_q[b].pre <= inc(age_q[b].pre);
        age_q[b].rd  <= inc(age_q[b].rd);
        age_q[b].wr  <= inc(age_q[b].wr);
        age_q[b].col <= inc(age_q[b].col);
      end
      ch_act_q <= inc(ch_act_q);
      ch_col_q <= inc(ch_col_q);
      ch_rd_q  <= inc(ch_rd_q);
      ch_wr_q  <= inc(ch_wr_q);
      // ages are "cycles since"; a command in this cycle makes it 1 in the next
      if (row_op_i == ROW_ACT) begin
        age_q[row_bank_i].act <= CW'(1);
        ch_act_q              <= CW'(1);
        open_q[row_bank_i]    <= 1'b1;
      end else if (row_op_i == ROW_PRE) begin
        if (open_q[row_bank_i]) age_q[row_bank_i].pre <= CW'(1);
        open_q[row_bank_i] <= 1'b0;
      end
      if (col_op_i != COL_NOP) begin
        age_q[col_bank_i].col <= CW'(1);
        ch_col_q              <= CW'(1);
        if (col_op_i == COL_RD) begin
          age_q[col_bank_i].rd <= CW'(1);
          ch_rd_q              <= CW'(1);
        end else begin
          age_q[col_bank_i].wr <= CW'(1);
          ch_wr_q              <= CW'(1);
        end
      end
      violation_o <= !row_ok_o || !col_ok_o;
    end
  end
endmodule
