// dm_clock_tree: the delay-matched gated clock tree.
//
// The factoring tree of the gating function is turned into a clock tree: the
// AND nodes with the variables h, f, e, g become clock gates with the
// enables en1..en4, and the rest of the tree becomes clock buffers. A single
// root clock is gated
//   by en1 into subtree N2,
//   by en2 into a branch that is gated again by en3 into subtree N1 and by en4
//   into subtree N3.
// So en1 alone runs N2, en2 with en3 runs N1, en2 with en4 runs N3, and all
// four enables together run the whole tree. Each subtree fans its gated clock
// out to its leaves through buffer stages; N2's leaves are taken from the
// stage depths p3, p3, p4, p5, p5 of the design's buffer chain.
//
// The structure and the leaf counts follow the design; the gates are
// latch-based clock gates (icg_cell), which is this implementation's choice.
// Buffers carry no logic and appear as named wires: their matched delay is a
// property of the cell library and layout, not of RTL.
module dm_clock_tree
  import cg_pkg::*;
#(
  parameter int unsigned N1_LEAVES_P = cg_pkg::N1_LEAVES,
  parameter int unsigned N2_LEAVES_P = cg_pkg::N2_LEAVES,
  parameter int unsigned N3_LEAVES_P = cg_pkg::N3_LEAVES
) (
  input  logic                   clk,
  input  en_t                    en,
  output logic [N1_LEAVES_P-1:0] n1_clk,
  output logic [N2_LEAVES_P-1:0] n2_clk,
  output logic [N3_LEAVES_P-1:0] n3_clk
);

  logic ck_n2;   // after the en1 gate
  logic ck_br;   // after the en2 gate
  logic ck_n1;   // after the en3 gate
  logic ck_n3;   // after the en4 gate

  icg_cell u_gate_en1 (.clk_in(clk),   .en(en.en1), .clk_out(ck_n2));
  icg_cell u_gate_en2 (.clk_in(clk),   .en(en.en2), .clk_out(ck_br));
  icg_cell u_gate_en3 (.clk_in(ck_br), .en(en.en3), .clk_out(ck_n1));
  icg_cell u_gate_en4 (.clk_in(ck_br), .en(en.en4), .clk_out(ck_n3));

  // Buffer chain of N2: p1 is the gated clock, p2..p5 the buffer outputs.
  logic p1, p2, p3, p4, p5;
  assign p1 = ck_n2;
  assign p2 = p1;
  assign p3 = p2;
  assign p4 = p2;
  assign p5 = p4;

  always_comb begin
    for (int unsigned i = 0; i < N2_LEAVES_P; i++) begin
      // Leaves 0,1 at depth p3, leaf 2 at p4, leaves 3.. at p5.
      if (i < 2)       n2_clk[i] = p3;
      else if (i == 2) n2_clk[i] = p4;
      else             n2_clk[i] = p5;
    end
  end

  assign n1_clk = {N1_LEAVES_P{ck_n1}};
  assign n3_clk = {N3_LEAVES_P{ck_n3}};

endmodule
