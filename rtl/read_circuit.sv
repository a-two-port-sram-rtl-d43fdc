// read_circuit: resumes the original data on a read.
//
// Each stored digit group of M bits is XORed with its flag bit, so a group
// that was written inverted comes back uninverted. This is the EX-OR based
// conditional inversion of the design. Combinational; it follows the array's
// registered read output.
module read_circuit #(
  parameter int unsigned M      = mlr_pkg::M_DEF,
  parameter int unsigned GROUPS = mlr_pkg::PIX_BITS_DEF
) (
  input  logic [GROUPS*M-1:0] data_i,  // stored groups, group g in [g*M +: M]
  input  logic [GROUPS-1:0]   flag_i,  // stored flags
  output logic [GROUPS*M-1:0] grp_o    // original groups
);
  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    assign grp_o[g*M +: M] = data_i[g*M +: M] ^ {M{flag_i[g]}};
  end
endmodule
