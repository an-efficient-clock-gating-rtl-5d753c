// cg_matching_top: clock-gating logic simplified by matching, end to end.
//
// Four parts, all on one root clock `clk`:
//   * sm_gating_logic computes the gating function F from the variables a..h,
//     reusing the existing nodes n1..n3 in place of F's subtrees (strong
//     matching); F and n1..n3 are outputs.
//   * sm_match_checker proves those substitutions: on `chk_start` it scans all
//     16 patterns of a..d through a copy of F's own subtrees (gating_fn_orig)
//     and a copy of the nodes (existing_nodes) and reports, 17 cycles later
//     (`chk_busy` high meanwhile),
//     which of the pairs (sb1,n1), (sb2,n2), (sb3,n3) match.
//   * dm_clock_tree gates the root clock with en1..en4 = h, f, e, g (delay
//     matching) into the leaf clocks of subtrees N1, N2, N3.
//   * s27 runs on those gated clocks: flip-flop y0 on a leaf of N1, y1 on N2,
//     y2 on N3, so clearing an enable freezes the corresponding flip-flop.
// How the checker and s27 attach to the rest is this implementation's choice;
// the design names the parts and the enables but not the wiring between them.
module cg_matching_top
  import cg_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  gvars_t               v,
  input  logic                 chk_start,
  input  logic [3:0]           g_in,
  output logic                 f_out,
  output logic [2:0]           n_out,      // {n3, n2, n1}
  output logic                 chk_busy,
  output logic                 chk_done,
  output logic [2:0]           chk_match,  // {sb3~n3, sb2~n2, sb1~n1}
  output logic [N1_LEAVES-1:0] n1_clk,
  output logic [N2_LEAVES-1:0] n2_clk,
  output logic [N3_LEAVES-1:0] n3_clk,
  output logic                 g17,
  output logic [2:0]           s27_state   // {y2, y1, y0}
);

  // Strong-matched gating function.
  sm_gating_logic u_sm (
    .v    (v),
    .n1   (n_out[0]),
    .n2   (n_out[1]),
    .n3   (n_out[2]),
    .f_out(f_out)
  );

  // Match checker with its own copies of the trees it compares.
  logic [3:0] chk_pattern;
  gvars_t     chk_v;
  logic       sb1, sb2, sb3, cn1, cn2, cn3, unused_f;

  always_comb begin
    chk_v   = '0;
    chk_v.a = chk_pattern[0];
    chk_v.b = chk_pattern[1];
    chk_v.c = chk_pattern[2];
    chk_v.d = chk_pattern[3];
  end

  gating_fn_orig u_chk_sub (
    .v    (chk_v),
    .sb1  (sb1),
    .sb2  (sb2),
    .sb3  (sb3),
    .f_out(unused_f)
  );

  existing_nodes u_chk_nodes (
    .v (chk_v),
    .n1(cn1),
    .n2(cn2),
    .n3(cn3)
  );

  sm_match_checker #(.NIN(4), .K(3)) u_chk (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (chk_start),
    .pattern (chk_pattern),
    .sub_val ({sb3, sb2, sb1}),
    .node_val({cn3, cn2, cn1}),
    .busy    (chk_busy),
    .done    (chk_done),
    .match   (chk_match)
  );

  // Delay-matched gated clock tree, enables taken from h, f, e, g.
  dm_clock_tree u_tree (
    .clk   (clk),
    .en    (enables_of(v)),
    .n1_clk(n1_clk),
    .n2_clk(n2_clk),
    .n3_clk(n3_clk)
  );

  // Benchmark circuit on the gated clocks.
  s27 u_s27 (
    .clk_y0(n1_clk[0]),
    .clk_y1(n2_clk[0]),
    .clk_y2(n3_clk[0]),
    .rst_n (rst_n),
    .g_in  (g_in),
    .g17   (g17),
    .state (s27_state)
  );

endmodule
