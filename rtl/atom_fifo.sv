// atom_fifo: small synchronous FIFO holding fetched column atoms inside a bank until
// their fixed read latency has elapsed. Push and pop in the same cycle are allowed.
// rdata_o shows the oldest entry whenever empty_o is low. Overflow and underflow are
// caught by assertions. DEPTH must be a power of two.
module atom_fifo #(
  parameter int unsigned WIDTH = 256,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             push_i,
  input  logic [WIDTH-1:0] wdata_i,
  input  logic             pop_i,
  output logic [WIDTH-1:0] rdata_o,
  output logic             empty_o,
  output logic             full_o
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem_q [DEPTH];
  logic [AW-1:0]    wp_q, rp_q;
  logic [AW:0]      cnt_q;

  assign empty_o = (cnt_q == '0);
  assign full_o  = (cnt_q == (AW+1)'(DEPTH));
  assign rdata_o = mem_q[rp_q];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else begin
      if (push_i) begin
        mem_q[wp_q] <= wdata_i;
        wp_q        <= wp_q + AW'(1);
      end
      if (pop_i) rp_q <= rp_q + AW'(1);
      cnt_q <= cnt_q + (AW+1)'(push_i) - (AW+1)'(pop_i);
    end
  end

  assert property (@(posedge clk_i) disable iff (!rst_ni) push_i |-> (!full_o || pop_i));
  assert property (@(posedge clk_i) disable iff (!rst_ni) pop_i |-> !empty_o);
endmodule
