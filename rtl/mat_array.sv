// mat_array: cell storage of one PPA bank, organised as half mats.
//
// A bank row is spread over NUM_SECTORS mats (8). The column mapping is changed so that a
// whole 32 B column atom lives in one sector: the left half of mat s and the right half
// of mat s-1, both driven by local row decoder s (sector 0 uses the left half of mat 0
// and the right half of the last mat, driven by the two edge decoders 0 and
// NUM_SECTORS). Each half mat delivers 16 bits per access over its own bitline set, so one
// access moves 32 bits: bits [15:0] from the left half of mat s and bits [31:16] from the
// right half of mat s-1.
//
// A half mat can be read or written only while its local wordline (lwl_i, from
// wordline_gate) is up; a read from a half mat whose wordline is down returns zeros,
// which stands in for data that was never sensed. Sense amplifiers, helper flip-flops
// and restore are not modelled as analog parts: the storage is written through
// directly. ROWS is this design's own size choice. The storage contents are not reset.
//
// Timing: one access per cycle; read data is registered (valid the cycle after rd_i),
// writes take effect at the clock edge.
module mat_array #(
  parameter int unsigned ROWS        = 32,
  parameter int unsigned NUM_SECTORS = 8,
  parameter int unsigned WORDS       = ppa_pkg::ROW_BYTES * 8 / NUM_SECTORS / ppa_pkg::FETCH_BITS
) (
  input  logic                                clk_i,
  input  logic [NUM_SECTORS:0]                lwl_i,
  input  logic [$clog2(ROWS)-1:0]             row_i,
  input  logic [$clog2(NUM_SECTORS)-1:0]      sector_i,
  input  logic [$clog2(WORDS)-1:0]            word_i,
  input  logic                                rd_i,
  input  logic                                wr_i,
  input  logic [ppa_pkg::FETCH_BITS-1:0]      wdata_i,
  output logic [ppa_pkg::FETCH_BITS-1:0]      rdata_o
);
  localparam int unsigned HALVES = 2 * NUM_SECTORS;
  localparam int unsigned HB     = ppa_pkg::HALF_BITS;
  localparam int unsigned DEPTH  = ROWS * WORDS;

  logic [HB-1:0] mem [HALVES][DEPTH];

  // half mat indices (2*m = left half of mat m, 2*m+1 = right half of mat m)
  logic [$clog2(HALVES)-1:0]      h_lo, h_hi;
  logic [$clog2(NUM_SECTORS+1)-1:0] d_lo, d_hi;   // their row decoders
  logic [$clog2(DEPTH)-1:0]       addr;
  logic                           en_lo, en_hi;

  always_comb begin
    h_lo  = $clog2(HALVES)'(2 * int'(sector_i));
    h_hi  = $clog2(HALVES)'((2 * int'(sector_i) + HALVES - 1) % HALVES);
    d_lo  = $clog2(NUM_SECTORS+1)'(sector_i);
    d_hi  = (sector_i == '0) ? $clog2(NUM_SECTORS+1)'(NUM_SECTORS)
                             : $clog2(NUM_SECTORS+1)'(sector_i);
    en_lo = lwl_i[d_lo];
    en_hi = lwl_i[d_hi];
    addr  = $clog2(DEPTH)'(int'(row_i) * WORDS + int'(word_i));
  end

  always_ff @(posedge clk_i) begin
    if (wr_i) begin
      if (en_lo) mem[h_lo][addr] <= wdata_i[HB-1:0];
      if (en_hi) mem[h_hi][addr] <= wdata_i[2*HB-1:HB];
    end
    if (rd_i) begin
      rdata_o[HB-1:0]    <= en_lo ? mem[h_lo][addr] : '0;
      rdata_o[2*HB-1:HB] <= en_hi ? mem[h_hi][addr] : '0;
    end
  end
endmodule
