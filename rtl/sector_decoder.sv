// sector_decoder: column address to sector decoder of a PPA bank.
//
// A 1 KB row holds 32 column atoms of 32 B. The row is split into NUM_SECTORS sectors
// (8 by default, 128 B each); a column command activates only the sector that holds its
// column. Following the design, columns are remapped so that a whole column atom lives in
// one sector. Which address bits pick the sector is this design's choice: the top bits of
// the column address, so that consecutive columns stay in one sector and a sequential
// stream needs one activation per 128 B. Purely combinational.
//
// Interface: col_i -> sector_o (index), sector_oh_o (one-hot), col_in_sector_o.
module sector_decoder #(
  parameter int unsigned NUM_SECTORS = 8,
  parameter int unsigned COL_BITS    = 5
) (
  input  logic [COL_BITS-1:0]             col_i,
  output logic [$clog2(NUM_SECTORS)-1:0]  sector_o,
  output logic [NUM_SECTORS-1:0]          sector_oh_o,
  output logic [COL_BITS-$clog2(NUM_SECTORS)-1:0] col_in_sector_o
);
  localparam int unsigned SEC_BITS = $clog2(NUM_SECTORS);

  always_comb begin
    sector_o        = col_i[COL_BITS-1 -: SEC_BITS];
    col_in_sector_o = col_i[COL_BITS-SEC_BITS-1:0];
    sector_oh_o     = '0;
    sector_oh_o[sector_o] = 1'b1;
  end
endmodule
