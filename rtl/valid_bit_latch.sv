// valid_bit_latch: per-bank activation bit vector (one valid bit per sector).
//
// Bit s is set when sector s of the open row is activated by a column command and stays
// set until the row is closed, so later column commands to the same sector reuse the
// already sensed data instead of activating it again. The vector is cleared by a
// precharge and, as this design's own safety choice, also by an activate. Clear wins over
// a set in the same cycle. The state updates at the rising clock edge; reset is
// asynchronous and active low.
module valid_bit_latch #(
  parameter int unsigned NUM_SECTORS = 8
) (
  input  logic                           clk_i,
  input  logic                           rst_ni,
  input  logic                           clear_i,
  input  logic                           set_i,
  input  logic [$clog2(NUM_SECTORS)-1:0] set_sector_i,
  output logic [NUM_SECTORS-1:0]         valid_o
);
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)      valid_o <= '0;
    else if (clear_i) valid_o <= '0;
    else if (set_i)   valid_o[set_sector_i] <= 1'b1;
  end
endmodule
