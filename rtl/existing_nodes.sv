// existing_nodes: three internal nodes that already exist in the combinational
// logic and that the gating function reuses after strong matching.
//
//   n1 = c(a+b)          n2 = (b+a)c + ba          n3 = (a+b)(c+d)
//
// The expressions and their factored structure are those of the design's
// node trees; only the packaging of the variables into cg_pkg::gvars_t is
// this implementation's choice. Purely combinational, no clock.
module existing_nodes
  import cg_pkg::*;
(
  input  gvars_t v,
  output logic   n1,
  output logic   n2,
  output logic   n3
);

  always_comb begin
    n1 = v.c & (v.a | v.b);
    n2 = ((v.b | v.a) & v.c) | (v.b & v.a);
    n3 = (v.a | v.b) & (v.c | v.d);
  end

endmodule
