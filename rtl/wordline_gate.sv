// wordline_gate: the AND gates that turn a global wordline into per-sector local wordlines.
//
// In a PPA subarray the 8 mats share one global wordline, and a local row decoder sits
// between neighbouring mats, so a subarray has NUM_SECTORS+1 of them (9). Each decoder
// drives the right half of the mat on its left and the left half of the mat on its right;
// those two half mats form one sector. Decoder d is enabled by
//     lwl_o[d] = gwl_i & valid_i[d % NUM_SECTORS]
// i.e. one AND gate per decoder. The two edge decoders (0 and NUM_SECTORS) each drive a
// single half mat; this design pairs them into sector 0, which is how 9 gates serve 8
// sectors. Purely combinational.
module wordline_gate #(
  parameter int unsigned NUM_SECTORS = 8
) (
  input  logic                   gwl_i,    // global wordline of the buffered row is up
  input  logic [NUM_SECTORS-1:0] valid_i,  // activation bit vector
  output logic [NUM_SECTORS:0]   lwl_o     // local wordline enables, one per row decoder
);
  always_comb begin
    for (int d = 0; d <= NUM_SECTORS; d++)
      lwl_o[d] = gwl_i & valid_i[d % NUM_SECTORS];
  end
endmodule
