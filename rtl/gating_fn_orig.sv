// gating_fn_orig: the gating function F built as its own factoring tree,
// before matching, with dedicated gates for each of its subtrees.
//
//   sb1 = (b+a)c                 same structure as node n1, children swapped
//   sb2 = ab + c(a+b)            differently structured, same function as n2
//   sb3 = (a+b)(c+d)             identical to node n3
//   F   = h*sb2 + f*( e*(b*d + a*sb1) + g*(d*e + sb3) )
//
// The subtrees and the positions of h, f, e, g follow the design's factoring
// tree; the operators of the inner glue nodes are this implementation's
// reading of that tree. The subtree outputs are brought out so that a match
// checker can compare them with the existing nodes. Combinational, no clock.
module gating_fn_orig
  import cg_pkg::*;
(
  input  gvars_t v,
  output logic   sb1,
  output logic   sb2,
  output logic   sb3,
  output logic   f_out
);

  logic br_e;  // branch gated by e (clock subtree N1)
  logic br_g;  // branch gated by g (clock subtree N3)

  always_comb begin
    sb1   = (v.b | v.a) & v.c;
    sb2   = (v.a & v.b) | (v.c & (v.a | v.b));
    sb3   = (v.a | v.b) & (v.c | v.d);
    br_e  = (v.b & v.d) | (v.a & sb1);
    br_g  = (v.d & v.e) | sb3;
    f_out = (v.h & sb2) | (v.f & ((v.e & br_e) | (v.g & br_g)));
  end

endmodule
