// dq_burst_io: burst serializer / deserializer between a 32 B column atom and the DQ pins.
//
// A column access is a burst of BURST_LEN (4) beats of DQ_BITS (64, one pseudo channel).
// The DQ pins run at double data rate, so two beats pass per clock and the model carries
// them as one 128-bit word per clock: bits [63:0] are the earlier beat, [127:64] the
// later. Beat b carries atom bits [64b+63:64b], so D0..D3 take the atom lowest bits first.
//
// Read:  load_i in cycle x with atom_i -> dq_o = {D1,D0} in cycle x+1, {D3,D2} in x+2,
//        dq_valid_o high in both; dq_o is zero while idle so banks can be OR-merged.
// Write: cap_lo_i in a cycle samples dq_i as {D1,D0}, cap_hi_i samples {D3,D2};
//        wr_atom_o holds the assembled atom from the cycle after cap_hi_i.
module dq_burst_io (
  input  logic                             clk_i,
  input  logic                             rst_ni,
  // read direction
  input  logic                             load_i,
  input  logic [ppa_pkg::ATOM_BITS-1:0]    atom_i,
  output logic [ppa_pkg::DQ_CLK_BITS-1:0]  dq_o,
  output logic                             dq_valid_o,
  // write direction
  input  logic                             cap_lo_i,
  input  logic                             cap_hi_i,
  input  logic [ppa_pkg::DQ_CLK_BITS-1:0]  dq_i,
  output logic [ppa_pkg::ATOM_BITS-1:0]    wr_atom_o
);
  import ppa_pkg::*;

  logic [DQ_CLK_BITS-1:0] second_q;   // {D3,D2} waiting for the second clock
  logic                   second_v_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      dq_o       <= '0;
      dq_valid_o <= 1'b0;
      second_q   <= '0;
      second_v_q <= 1'b0;
      wr_atom_o  <= '0;
    end else begin
      if (load_i) begin
        dq_o       <= atom_i[DQ_CLK_BITS-1:0];
        dq_valid_o <= 1'b1;
        second_q   <= atom_i[ATOM_BITS-1:DQ_CLK_BITS];
        second_v_q <= 1'b1;
      end else if (second_v_q) begin
        dq_o       <= second_q;
        dq_valid_o <= 1'b1;
        second_v_q <= 1'b0;
      end else begin
        dq_o       <= '0;
        dq_valid_o <= 1'b0;
      end
      if (cap_lo_i) wr_atom_o[DQ_CLK_BITS-1:0]         <= dq_i;
      if (cap_hi_i) wr_atom_o[ATOM_BITS-1:DQ_CLK_BITS] <= dq_i;
    end
  end

  // a new burst may not start while the second half of the previous one is pending
  assert property (@(posedge clk_i) disable iff (!rst_ni) load_i |-> !second_v_q);
endmodule
