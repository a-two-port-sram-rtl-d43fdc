// mlr_pkg: constants shared by the majority-logic / data-bit-reordering
// two-port SRAM.
//
// The memory stores luma pixels in words of M pixels. Before a write the
// M pixels are transposed into PIX_BITS digit groups (group d holds bit d of
// every pixel), each group is inverted when 0s are not in the minority, and
// an inversion flag per group is stored next to the data. The defaults are
// the configuration the design is built around: M = 8 pixels of 8-bit luma
// per word, giving 64 data bits + 8 flag bits = 72 bits per word, and
// 1024 words for a 72-kbit array (64 kbit data, 8 kbit flags). The word
// organisation (1024 x 72) is this design's reading of that capacity.
package mlr_pkg;
  localparam int unsigned M_DEF        = 8;     // pixels per digit group
  localparam int unsigned PIX_BITS_DEF = 8;     // bits per luma pixel
  localparam int unsigned WORDS_DEF    = 1024;  // 72 kbit / 72-bit word

  // Stored word width: data bits plus one flag per digit group.
  function automatic int unsigned word_width(int unsigned m, int unsigned pix_bits);
    return m * pix_bits + pix_bits;
  endfunction
endpackage
