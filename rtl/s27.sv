// s27: the ISCAS-89 benchmark circuit s27, used as the circuit that the gated
// clocks drive.
//
// Four inputs G0..G3 (I0..I3), one output G17 and three flip-flops
// y0 = G5, y1 = G6, y2 = G7, with the standard gate list:
//   G14 = !G0          G8  = G14 & G6       G12 = !(G1 | G7)
//   G15 = G12 | G8     G16 = G3 | G8        G9  = !(G16 & G15)
//   G11 = !(G5 | G9)   G10 = !(G14 | G11)   G13 = !(G2 | G12)
//   G17 = !G11         next G5 = G10, next G6 = G11, next G7 = G13
//
// Each flip-flop has a clock of its own so that the clock tree can freeze
// it: y0 is meant for a leaf of N1, y1 for N2, y2 for N3. A flip-flop whose
// clock is gated keeps its value. The per-flip-flop clocks and the
// asynchronous active-low reset to 0 are this implementation's choices; the
// benchmark itself has neither.
module s27 (
  input  logic       clk_y0,
  input  logic       clk_y1,
  input  logic       clk_y2,
  input  logic       rst_n,
  input  logic [3:0] g_in,    // {G3, G2, G1, G0}
  output logic       g17,
  output logic [2:0] state    // {G7, G6, G5}
);

  logic g5, g6, g7;
  logic g8, g9, g10, g11, g12, g13, g14, g15, g16;

  always_comb begin
    g14 = ~g_in[0];
    g8  = g14 & g6;
    g12 = ~(g_in[1] | g7);
    g15 = g12 | g8;
    g16 = g_in[3] | g8;
    g9  = ~(g16 & g15);
    g11 = ~(g5 | g9);
    g10 = ~(g14 | g11);
    g13 = ~(g_in[2] | g12);
    g17 = ~g11;
  end

  always_ff @(posedge clk_y0 or negedge rst_n)
    if (!rst_n) g5 <= 1'b0;
    else        g5 <= g10;

  always_ff @(posedge clk_y1 or negedge rst_n)
    if (!rst_n) g6 <= 1'b0;
    else        g6 <= g11;

  always_ff @(posedge clk_y2 or negedge rst_n)
    if (!rst_n) g7 <= 1'b0;
    else        g7 <= g13;

  assign state = {g7, g6, g5};

endmodule
