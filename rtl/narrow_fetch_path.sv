// narrow_fetch_path: moves one 32 B column atom between a sector and the bank's I/O
// buffer through the narrow 32-bit path (16 bitlines on each of the two half mats).
//
// Because only one sector is activated, the atom cannot leave the array over a 128-bit
// path in 2 cycles; it is moved 32 bits per cycle in FETCH_CYCLES (8) cycles, filling the
// buffer 32b, 64b, ... 256b. Word k of the atom is bits [32k+31:32k].
//
// Read:  start_rd_i in cycle s -> array reads in cycles s+1 .. s+8 -> atom_o is complete
//        and atom_valid_o pulses in cycle s+10 (one cycle of registered array output and
//        one of capture).
// Write: start_wr_i in cycle s with wr_atom_i -> array writes in cycles s+1 .. s+8.
// A new start may arrive in the last issuing cycle of the previous transfer (cycle s+8),
// so transfers can follow each other every 8 cycles, which is what the lengthened
// same-bank column spacing guarantees. busy_o is high while words are being issued.
module narrow_fetch_path #(
  parameter int unsigned WORD_BITS = 5   // log2 of 32-bit words per sector
) (
  input  logic                              clk_i,
  input  logic                              rst_ni,
  input  logic                              start_rd_i,
  input  logic                              start_wr_i,
  input  logic [WORD_BITS-4:0]              col_i,       // column within the sector
  input  logic [ppa_pkg::ATOM_BITS-1:0]     wr_atom_i,
  // towards the mat array
  output logic                              arr_rd_o,
  output logic                              arr_wr_o,
  output logic [WORD_BITS-1:0]              arr_word_o,
  output logic [ppa_pkg::FETCH_BITS-1:0]    arr_wdata_o,
  input  logic [ppa_pkg::FETCH_BITS-1:0]    arr_rdata_i,
  // towards the I/O buffer
  output logic [ppa_pkg::ATOM_BITS-1:0]     atom_o,
  output logic                              atom_valid_o,
  output logic                              busy_o
);
  import ppa_pkg::*;

  logic                      active_q, mode_wr_q;
  logic [2:0]                cnt_q;
  logic [WORD_BITS-4:0]      col_q;
  logic [ATOM_BITS-1:0]      wbuf_q;
  logic                      cap_q;       // array read data arrives this cycle
  logic [2:0]                cap_idx_q;

  assign busy_o      = active_q;
  assign arr_rd_o    = active_q & ~mode_wr_q;
  assign arr_wr_o    = active_q &  mode_wr_q;
  assign arr_word_o  = {col_q, cnt_q};
  assign arr_wdata_o = wbuf_q[int'(cnt_q)*FETCH_BITS +: FETCH_BITS];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      active_q     <= 1'b0;
      mode_wr_q    <= 1'b0;
      cnt_q        <= '0;
      col_q        <= '0;
      wbuf_q       <= '0;
      cap_q        <= 1'b0;
      cap_idx_q    <= '0;
      atom_o       <= '0;
      atom_valid_o <= 1'b0;
    end else begin
      // issue side
      if (start_rd_i || start_wr_i) begin
        active_q  <= 1'b1;
        mode_wr_q <= start_wr_i;
        cnt_q     <= '0;
        col_q     <= col_i;
        if (start_wr_i) wbuf_q <= wr_atom_i;
      end else if (active_q) begin
        cnt_q <= cnt_q + 3'd1;
        if (cnt_q == 3'(FETCH_CYCLES - 1)) active_q <= 1'b0;
      end
      // capture side (reads only)
      cap_q     <= arr_rd_o;
      cap_idx_q <= cnt_q;
      atom_valid_o <= 1'b0;
      if (cap_q) begin
        atom_o[int'(cap_idx_q)*FETCH_BITS +: FETCH_BITS] <= arr_rdata_i;
        if (cap_idx_q == 3'(FETCH_CYCLES - 1)) atom_valid_o <= 1'b1;
      end
    end
  end

  // a transfer may only start when the previous one is issuing its last word
  assert property (@(posedge clk_i) disable iff (!rst_ni)
    (start_rd_i || start_wr_i) |-> (!active_q || cnt_q == 3'(FETCH_CYCLES - 1)));
  assert property (@(posedge clk_i) disable iff (!rst_ni) !(start_rd_i && start_wr_i));
endmodule
