// bit_restore: read-side inverse of bit_reorder.
//
// Puts the bits of PIX_BITS digit groups of M bits back into M pixels:
//   grp_i[d*M + p]  ->  pix_o[p*PIX_BITS + d]
// Used after the read circuit has undone the per-group inversion, so the
// reader of the memory sees the original pixels. Restoring the pixel order on
// a read is part of the scheme; the bit placement mirrors bit_reorder, which
// is this design's choice. Pure wiring, no timing.
module bit_restore #(
  parameter int unsigned M        = mlr_pkg::M_DEF,
  parameter int unsigned PIX_BITS = mlr_pkg::PIX_BITS_DEF
) (
  input  logic [PIX_BITS*M-1:0] grp_i,  // group d in [d*M +: M]
  output logic [M*PIX_BITS-1:0] pix_o   // pixel p in [p*PIX_BITS +: PIX_BITS]
);
  always_comb begin
    for (int p = 0; p < M; p++)
      for (int d = 0; d < PIX_BITS; d++)
        pix_o[p*PIX_BITS + d] = grp_i[d*M + p];
  end
endmodule
