// tp_sram_array: two-port memory array, one write port and one read port.
//
// Models the array of 8-transistor two-port cells: a differential write port
// (write bitlines without precharge) and a single-ended read port whose read
// bitline is precharged high and discharged only by a stored 0. Both ports
// work in the same clock cycle. The default size is the design's 72 kbit,
// organised here as WORDS = 1024 words of WIDTH = 72 bits (64 data + 8 flag);
// the organisation is this design's choice.
// Timing (this design's choice): the write is captured at the rising edge when
// we = 1. With re = 1 at a rising edge, rdata shows the word at raddr from
// just after that edge; it holds while re = 0. A read and a write of the same
// address in one cycle return the old word. rdata is the value on the read
// bitlines, so its 0 bits are the bitline discharges of that read.
// Contents are not reset, as in an SRAM; rdata resets to all 1s (precharged).
module tp_sram_array #(
  parameter int unsigned WORDS = mlr_pkg::WORDS_DEF,
  parameter int unsigned WIDTH = mlr_pkg::word_width(mlr_pkg::M_DEF, mlr_pkg::PIX_BITS_DEF),
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '1;
    else if (re) rdata <= mem[raddr];
  end

  // Addresses beyond WORDS do not exist when WORDS is not a power of two.
  a_waddr: assert property (@(posedge clk) we |-> int'(waddr) < int'(WORDS));
  a_raddr: assert property (@(posedge clk) re |-> int'(raddr) < int'(WORDS));
endmodule
