// cg_pkg: types and constants shared by the clock-gating-by-matching design.
//
// gvars_t bundles the eight Boolean variables a..h of the gating function
// (a is bit 0, h is bit 7). Four of them, h, f, e and g, also act as the
// enables en1..en4 of the gated clock tree; en_t names those four bits.
// The leaf counts of the three clock subtrees N1, N2, N3 are the numbers of
// leaves drawn for them in the design's tree figures.
package cg_pkg;

  typedef struct packed {
    logic h;
    logic g;
    logic f;
    logic e;
    logic d;
    logic c;
    logic b;
    logic a;
  } gvars_t;

  // Enables of the clock tree, en1 in bit 0.
  typedef struct packed {
    logic en4;  // gates subtree N3 (variable g)
    logic en3;  // gates subtree N1 (variable e)
    logic en2;  // gates the branch holding N1 and N3 (variable f)
    logic en1;  // gates subtree N2 (variable h)
  } en_t;

  localparam int unsigned N1_LEAVES = 6;
  localparam int unsigned N2_LEAVES = 5;
  localparam int unsigned N3_LEAVES = 6;

  // Enables are taken from the gating-function variables h, f, e, g.
  function automatic en_t enables_of(gvars_t v);
    en_t en;
    en.en1 = v.h;
    en.en2 = v.f;
    en.en3 = v.e;
    en.en4 = v.g;
    return en;
  endfunction

endpackage
