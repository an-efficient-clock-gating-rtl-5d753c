// tb_s27: runs s27 with random inputs and random subsets of its three clocks
// pulsed, and compares outputs and state with a reference model of the
// benchmark written as next-state equations in sum-of-products form. A
// flip-flop whose clock is not pulsed must keep its value.
module tb_s27;
  logic       c0 = 1'b0, c1 = 1'b0, c2 = 1'b0, rst_n = 1'b1;
  logic [3:0] g_in = '0;
  logic       g17;
  logic [2:0] state;
  int         checks = 0, failures = 0;
  logic [2:0] ref_s;   // {y2, y1, y0}

  s27 dut (.clk_y0(c0), .clk_y1(c1), .clk_y2(c2), .rst_n(rst_n),
           .g_in(g_in), .g17(g17), .state(state));

  // Reference: with y0=G5, y1=G6, y2=G7.
  function automatic logic [3:0] ref_next(logic [2:0] s, logic [3:0] i);
    logic y0, y1, y2, g12, g8, g9, g11, n0, n2;
    {y2, y1, y0} = s;
    g12 = !i[1] && !y2;
    g8  = !i[0] && y1;
    g9  = !((i[3] || g8) && (g12 || g8));
    g11 = !y0 && !g9;
    n0  = i[0] && !g11;          // G10 = NOR(!G0, G11)
    n2  = !i[2] && !g12;         // G13
    return {!g11, n2, g11, n0};  // {G17, next y2, next y1, next y0}
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] nx;
    logic [2:0] pulse;
    int seen [8];
    #1 rst_n = 1'b0;
    #4 rst_n = 1'b1;
    ref_s = '0;
    checks++;
    if (state !== 3'b000) begin failures++; $display("reset state %b", state); end
    for (int t = 0; t < 2000; t++) begin
      g_in = 4'($urandom);
      pulse = (t % 4 == 0) ? 3'b111 : 3'($urandom);
      #1;
      nx = ref_next(ref_s, g_in);
      checks++;
      if (g17 !== nx[3]) begin failures++; $display("G17 %b exp %b t=%0d", g17, nx[3], t); end
      {c2, c1, c0} = pulse;
      #1;
      {c2, c1, c0} = 3'b000;
      #1;
      for (int k = 0; k < 3; k++) if (pulse[k]) ref_s[k] = nx[k];
      checks++;
      if (state !== ref_s) begin failures++; $display("state %b exp %b t=%0d", state, ref_s, t); end
      seen[state]++;
    end
    for (int s = 0; s < 8; s++) $display("state %0d visited %0d times", s, seen[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
