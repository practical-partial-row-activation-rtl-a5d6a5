// ppa_pkg: types and constants shared by the partial-row-activation (PPA) HBM2 model.
//
// One memory cycle is one clock at 1000 MHz, so every timing value below is both a
// number of nanoseconds and a number of clock cycles. The HBM2 channel has a row
// command bus (ACT, PRE) and a column command bus (RD, WR) that are used in parallel.
//
// Taken from the design description: 1 KB rows split into 8 sectors, 32 B column atoms,
// a 32-bit narrow path that needs 8 cycles per atom (6 more than the 2 cycles of the
// 128-bit baseline path), tRCD halved to 8 by delayed activation with an 8-cycle
// activation moved into the column command, tAA and tWL lengthened by that 8, tAA
// lengthened by a further 6, the same-bank column-to-column spacing set to tCCD+6,
// tWR/tWTR/tRTP lengthened by 6, and the baseline values tRP=16, tRC=45, tRAS=29,
// tCCD=2, tRRD=2, tWR=15, tCL=12.
// Own choices: the baseline write latency (2), the baseline tRTP and tWTR (4 each), and
// the extra 8 cycles on tRTP so that a precharge cannot cut off an atom that is still
// being fetched after its delayed activation.
package ppa_pkg;

  // ---------------------------------------------------------------- organisation
  localparam int unsigned ROW_BYTES     = 1024;  // row size of one pseudo channel
  localparam int unsigned ATOM_BITS     = 256;   // one 32 B column
  localparam int unsigned COLS_PER_ROW  = ROW_BYTES * 8 / ATOM_BITS;  // 32
  localparam int unsigned COL_BITS      = $clog2(COLS_PER_ROW);       // 5
  localparam int unsigned FETCH_BITS    = 32;    // two half mats x 16 bitlines
  localparam int unsigned FETCH_CYCLES  = ATOM_BITS / FETCH_BITS;     // 8
  localparam int unsigned HALF_BITS     = FETCH_BITS / 2;             // 16 per half mat
  localparam int unsigned DQ_BITS       = 64;    // one pseudo channel, one beat
  localparam int unsigned BURST_LEN     = 4;     // beats per column access
  localparam int unsigned BURST_CYCLES  = BURST_LEN / 2;              // DDR: 2 beats per clock
  localparam int unsigned DQ_CLK_BITS   = 2 * DQ_BITS;                // bits per clock

  // ---------------------------------------------------------------- baseline HBM2 timing
  localparam int unsigned T_RP      = 16;
  localparam int unsigned T_RC      = 45;
  localparam int unsigned T_RAS     = 29;
  localparam int unsigned T_RCD     = 16;
  localparam int unsigned T_CCD_S   = 2;   // column to column, any banks of the channel
  localparam int unsigned T_RRD     = 2;
  localparam int unsigned T_WR_BASE = 15;
  localparam int unsigned T_CL      = 12;
  localparam int unsigned T_WL_BASE = 2;   // own choice
  localparam int unsigned T_RTP_BASE= 4;   // own choice
  localparam int unsigned T_WTR_BASE= 4;   // own choice

  // ---------------------------------------------------------------- PPA adjustments
  localparam int unsigned T_NARROW_EXTRA = FETCH_CYCLES - BURST_CYCLES;  // 6
  localparam int unsigned T_ACT_DELAY    = T_RCD / 2;                    // 8, activation inside RD/WR
  localparam int unsigned T_RCD_PPA      = T_RCD / 2;                    // 8, ACT to RD/WR
  localparam int unsigned T_RL           = T_CL + T_ACT_DELAY + T_NARROW_EXTRA;  // 26
  localparam int unsigned T_WL           = T_WL_BASE + T_ACT_DELAY;      // 10
  localparam int unsigned T_CCD_BANK     = T_CCD_S + T_NARROW_EXTRA;     // 8, same bank
  localparam int unsigned T_WR_PPA       = T_WR_BASE + T_NARROW_EXTRA;   // 21
  localparam int unsigned T_WTR_PPA      = T_WTR_BASE + T_NARROW_EXTRA;  // 10
  localparam int unsigned T_RTP_PPA      = T_RTP_BASE + T_NARROW_EXTRA + T_ACT_DELAY; // 18

  // ---------------------------------------------------------------- commands
  typedef enum logic [1:0] {ROW_NOP = 2'd0, ROW_ACT = 2'd1, ROW_PRE = 2'd2} row_op_e;
  typedef enum logic [1:0] {COL_NOP = 2'd0, COL_RD  = 2'd1, COL_WR  = 2'd2} col_op_e;

endpackage
