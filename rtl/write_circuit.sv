// write_circuit: majority-logic write path of the memory.
//
// For each of GROUPS digit groups of M bits, a majority_logic instance decides
// whether 0s are not in the minority; such a group is written inverted and its
// flag bit is written as 1, otherwise the group is written as is with flag 0.
// After this block every group holds at least as many 1s as 0s (more when M is
// even and a tie occurs, since a tie inverts). The flag choice ("1" means
// inversion) follows the design; it keeps the flag itself at 1 for the common
// case of mostly-0 upper digit groups in video data.
// Combinational; its outputs drive the array's write port, which captures them
// at the clock edge.
module write_circuit #(
  parameter int unsigned M      = mlr_pkg::M_DEF,
  parameter int unsigned GROUPS = mlr_pkg::PIX_BITS_DEF
) (
  input  logic [GROUPS*M-1:0] grp_i,   // group g in [g*M +: M]
  output logic [GROUPS*M-1:0] data_o,  // groups as they are stored
  output logic [GROUPS-1:0]   flag_o   // flag g = 1: group g stored inverted
);
  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    majority_logic #(.M(M)) u_maj (
      .grp_i (grp_i[g*M +: M]),
      .inv_o (flag_o[g])
    );
    assign data_o[g*M +: M] = grp_i[g*M +: M] ^ {M{flag_o[g]}};
  end
endmodule
