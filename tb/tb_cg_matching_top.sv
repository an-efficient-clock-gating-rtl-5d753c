// tb_cg_matching_top: end-to-end test of the whole design at its default sizes.
//  1. Gating function: all 256 values of a..h, F and n1..n3 against a
//     reference evaluated independently.
//  2. Match checker: one scan; all three subtree/node pairs must be reported
//     as strong matches exactly 17 cycles after start.
//  3. Gated clocks and s27: 3000 cycles with random a..h (so random enables
//     h, f, e, g) and random s27 inputs. A reference model updates flip-flop
//     y0 only when f&e (subtree N1 clocked), y1 only when h (N2), y2 only when
//     f&g (N3). Counts how often each subtree was gated off and how often the
//     whole tree ran, and fails if any of these never happened.
module tb_cg_matching_top;
  import cg_pkg::*;

  logic                 clk = 1'b0, rst_n = 1'b1, chk_start = 1'b0;
  gvars_t               v = '0;
  logic [3:0]           g_in = '0;
  logic                 f_out, chk_busy, chk_done, g17;
  logic [2:0]           n_out, chk_match, s27_state;
  logic [N1_LEAVES-1:0] n1_clk;
  logic [N2_LEAVES-1:0] n2_clk;
  logic [N3_LEAVES-1:0] n3_clk;
  int                   checks = 0, failures = 0;

  cg_matching_top dut (
    .clk(clk), .rst_n(rst_n), .v(v), .chk_start(chk_start), .g_in(g_in), .chk_busy(chk_busy),
    .f_out(f_out), .n_out(n_out), .chk_done(chk_done), .chk_match(chk_match),
    .n1_clk(n1_clk), .n2_clk(n2_clk), .n3_clk(n3_clk),
    .g17(g17), .s27_state(s27_state)
  );

  always #5 clk = ~clk;

  function automatic logic ref_f(gvars_t x);
    logic maj, s1, s3;
    maj = (int'(x.a) + int'(x.b) + int'(x.c)) >= 2;
    s1  = x.c && (x.a || x.b);
    s3  = (x.a || x.b) && (x.c || x.d);
    if (x.h && maj) return 1'b1;
    if (!x.f)       return 1'b0;
    if (x.e && ((x.b && x.d) || (x.a && s1))) return 1'b1;
    if (x.g && ((x.d && x.e) || s3))          return 1'b1;
    return 1'b0;
  endfunction

  // s27 reference: returns {G17, next y2, next y1, next y0}.
  function automatic logic [3:0] ref_s27(logic [2:0] s, logic [3:0] i);
    logic y0, y1, y2, g12, g8, g9, g11;
    {y2, y1, y0} = s;
    g12 = !i[1] && !y2;
    g8  = !i[0] && y1;
    g9  = !((i[3] || g8) && (g12 || g8));
    g11 = !y0 && !g9;
    return {!g11, !i[2] && !g12, g11, i[0] && !g11};
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f_ones = 0, f_zeros = 0, scans = 0, sm_found = 0;
    int n1_off = 0, n2_off = 0, n3_off = 0, all_on = 0, branch_off = 0;
    int cyc;
    logic [2:0] ref_s;
    logic [3:0] nx;
    logic [2:0] upd;

    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (s27_state !== 3'b000 || chk_done) begin failures++; $display("reset state wrong"); end

    // 1. Gating function, exhaustive. The enables follow v; s27 state is
    //    tracked by the reference model below from here on.
    ref_s = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      v = gvars_t'(i[7:0]);
      nx = ref_s27(ref_s, g_in);
      upd = {v.f & v.g, v.h, v.f & v.e};
      #1;
      checks += 2;
      if (f_out !== ref_f(v)) begin failures++; $display("F wrong at %0d", i); end
      if (n_out !== {(v.a || v.b) && (v.c || v.d),
                     (int'(v.a) + int'(v.b) + int'(v.c)) >= 2,
                     v.c && (v.a || v.b)}) begin failures++; $display("nodes wrong at %0d", i); end
      if (f_out) f_ones++; else f_zeros++;
      @(posedge clk); #1;
      for (int k = 0; k < 3; k++) if (upd[k]) ref_s[k] = nx[k];
      checks++;
      if (s27_state !== ref_s) begin failures++; $display("s27 %b exp %b (sweep %0d)", s27_state, ref_s, i); end
    end

    // 2. Match checker scan, enables all off so s27 holds.
    @(negedge clk);
    v = '0;
    chk_start = 1'b1;
    @(negedge clk);
    chk_start = 1'b0;
    cyc = 1;
    checks++;
    if (!chk_busy) begin failures++; $display("checker not busy"); end
    while (!chk_done && cyc < 100) begin @(negedge clk); cyc++; end
    scans++;
    checks += 3;
    if (cyc != 17) begin failures++; $display("checker latency %0d", cyc); end
    if (chk_match !== 3'b111) begin failures++; $display("match %b", chk_match); end
    else sm_found += 3;
    if (s27_state !== ref_s) begin failures++; $display("s27 moved while gated"); end

    // 3. Random enables and inputs.
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      v    = gvars_t'(8'($urandom));
      g_in = 4'($urandom);
      if (t % 5 == 0) begin v.h = 1'b1; v.f = 1'b1; v.e = 1'b1; v.g = 1'b1; end
      #1;
      nx  = ref_s27(ref_s, g_in);
      upd = {v.f & v.g, v.h, v.f & v.e};
      checks++;
      if (g17 !== nx[3]) begin failures++; $display("G17 wrong t=%0d", t); end
      if (!upd[0]) n1_off++;
      if (!upd[1]) n2_off++;
      if (!upd[2]) n3_off++;
      if (!v.f)    branch_off++;
      if (upd == 3'b111) all_on++;
      @(posedge clk); #1;
      for (int k = 0; k < 3; k++) if (upd[k]) ref_s[k] = nx[k];
      checks++;
      if (s27_state !== ref_s) begin failures++; $display("s27 %b exp %b t=%0d", s27_state, ref_s, t); end
    end

    $display("F=1 %0d  F=0 %0d  scans %0d  strong matches %0d", f_ones, f_zeros, scans, sm_found);
    $display("N1 gated %0d  N2 gated %0d  N3 gated %0d  en2 branch gated %0d  whole tree %0d",
             n1_off, n2_off, n3_off, branch_off, all_on);
    checks += 8;
    if (f_ones == 0)     begin failures++; $display("F never 1"); end
    if (f_zeros == 0)    begin failures++; $display("F never 0"); end
    if (sm_found != 3)     begin failures++; $display("strong matches not all found"); end
    if (n1_off == 0)     begin failures++; $display("N1 never gated"); end
    if (n2_off == 0)     begin failures++; $display("N2 never gated"); end
    if (n3_off == 0)     begin failures++; $display("N3 never gated"); end
    if (branch_off == 0) begin failures++; $display("en2 branch never gated"); end
    if (all_on == 0)     begin failures++; $display("whole tree never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
