// sm_gating_logic: the gating function F after strong matching.
//
// Each subtree of F that has a strong match among the existing nodes is not
// built again: sb1 is taken from n1 (syntactically equivalent), sb2 from n2
// (equivalent) and sb3 from n3 (identical). What remains to add are the glue
// gates around them:
//
//   F = h*n2 + f*( e*(b*d + a*n1) + g*(d*e + n3) )
//
// The node outputs are also outputs of this module, since the rest of the
// circuit uses them. The substitution follows the design's strong-matching
// example; the glue operators are this implementation's reading of its tree.
// Combinational, no clock.
module sm_gating_logic
  import cg_pkg::*;
(
  input  gvars_t v,
  output logic   n1,
  output logic   n2,
  output logic   n3,
  output logic   f_out
);

  existing_nodes u_nodes (
    .v (v),
    .n1(n1),
    .n2(n2),
    .n3(n3)
  );

  logic br_e;
  logic br_g;

  always_comb begin
    br_e  = (v.b & v.d) | (v.a & n1);
    br_g  = (v.d & v.e) | n3;
    f_out = (v.h & n2) | (v.f & ((v.e & br_e) | (v.g & br_g)));
  end

endmodule
