// mlr_sram_top: low-power two-port video SRAM with majority logic and
// data-bit reordering.
//
// Each word holds M neighbouring luma pixels of PIX_BITS bits. On a write the
// pixels are reordered into PIX_BITS digit groups (bit d of every pixel in
// group d), each group is inverted when 0s are not in the minority, and one
// flag bit per group records the inversion. The array thus stores mostly 1s,
// and a precharged single-ended read bitline only spends energy on a stored 0.
// On a read the flags undo the inversion (XOR) and the groups are put back
// into pixels, so the memory is transparent to its user.
//
// Interface: one write (we, waddr, wpix) and one read (re, raddr) per clock
// cycle, both at the rising edge. Read latency is one cycle: rpix and rvalid
// are valid in the cycle after re (this design's choice). rpix holds its value
// until the next read. rbl_o shows the stored word of the last read as it sits
// on the read bitlines (data groups in the low M*PIX_BITS bits, flags above);
// each 0 in it is one read-bitline discharge. A read and a write to the same
// address in the same cycle return the old pixels.
module mlr_sram_top #(
  parameter int unsigned M        = mlr_pkg::M_DEF,
  parameter int unsigned PIX_BITS = mlr_pkg::PIX_BITS_DEF,
  parameter int unsigned WORDS    = mlr_pkg::WORDS_DEF,
  localparam int unsigned AW      = $clog2(WORDS),
  localparam int unsigned DW      = M * PIX_BITS,
  localparam int unsigned SW      = mlr_pkg::word_width(M, PIX_BITS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wpix,    // pixel p in [p*PIX_BITS +: PIX_BITS]
  // read port
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rpix,
  output logic          rvalid,
  output logic [SW-1:0] rbl_o    // stored word of the last read
);
  logic [DW-1:0]       wgrp, wdata, rdat_grp, rgrp;
  logic [PIX_BITS-1:0] wflag, rflag;
  logic [SW-1:0]       rword;

  bit_reorder #(.M(M), .PIX_BITS(PIX_BITS)) u_reorder (
    .pix_i (wpix),
    .grp_o (wgrp)
  );

  write_circuit #(.M(M), .GROUPS(PIX_BITS)) u_wr (
    .grp_i  (wgrp),
    .data_o (wdata),
    .flag_o (wflag)
  );

  tp_sram_array #(.WORDS(WORDS), .WIDTH(SW)) u_array (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (we),
    .waddr (waddr),
    .wdata ({wflag, wdata}),
    .re    (re),
    .raddr (raddr),
    .rdata (rword)
  );

  assign rdat_grp = rword[DW-1:0];
  assign rflag    = rword[SW-1:DW];

  read_circuit #(.M(M), .GROUPS(PIX_BITS)) u_rd (
    .data_i (rdat_grp),
    .flag_i (rflag),
    .grp_o  (rgrp)
  );

  bit_restore #(.M(M), .PIX_BITS(PIX_BITS)) u_restore (
    .grp_i (rgrp),
    .pix_o (rpix)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= re;
  end

  assign rbl_o = rword;
endmodule
