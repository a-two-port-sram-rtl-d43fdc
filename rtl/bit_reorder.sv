// bit_reorder: write-side data-bit reordering.
//
// Adjacent pixels are strongly correlated in their upper bits, so the bits of
// one significance taken over M neighbouring pixels tend to agree. This block
// transposes M pixels of PIX_BITS bits into PIX_BITS digit groups of M bits,
// so that the majority logic later sees such a lopsided group.
//   pix_i[p*PIX_BITS + d]  ->  grp_o[d*M + p]
// Group d is the d-th digit (d = 0 is the LSB group); inside a group, bit p
// comes from pixel p. The transpose itself follows the design; the placement
// of bits inside the word is this design's choice. Pure wiring, no timing.
module bit_reorder #(
  parameter int unsigned M        = mlr_pkg::M_DEF,
  parameter int unsigned PIX_BITS = mlr_pkg::PIX_BITS_DEF
) (
  input  logic [M*PIX_BITS-1:0] pix_i,  // pixel p in [p*PIX_BITS +: PIX_BITS]
  output logic [PIX_BITS*M-1:0] grp_o   // group d in [d*M +: M]
);
  always_comb begin
    for (int d = 0; d < PIX_BITS; d++)
      for (int p = 0; p < M; p++)
        grp_o[d*M + p] = pix_i[p*PIX_BITS + d];
  end
endmodule
