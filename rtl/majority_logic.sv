// majority_logic: inversion decision for one digit group of M bits.
//
// A read bitline is precharged high and only discharges when a 0 is read, so
// storing as many 1s as possible saves read power. The group is inverted
// when the number of 0s is at least M/2; a tie therefore inverts, which the
// design describes as the effect of a dummy pull-down on one side of its
// differential majority sense amplifier. inv_o is also the value of the
// group's flag bit ("1" means inverted).
// The original is a precharge circuit: every 0 pulls down one node, every 1
// the other, and a sense amplifier compares the two. Here the same decision
// is written as a count of 0s and a compare, which is this design's choice.
// Combinational, no timing.
module majority_logic #(
  parameter int unsigned M = mlr_pkg::M_DEF
) (
  input  logic [M-1:0] grp_i,
  output logic         inv_o
);
  localparam int unsigned CW = $clog2(M + 1);
  logic [CW-1:0] zeros;

  always_comb begin
    zeros = '0;
    for (int i = 0; i < M; i++)
      zeros += CW'(!grp_i[i]);
  end

  // 2*zeros >= M, i.e. zeros >= M/2 without truncating odd M
  assign inv_o = ({1'b0, zeros} << 1) >= (CW + 1)'(M);
endmodule
