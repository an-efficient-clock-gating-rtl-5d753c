// tb_dm_clock_tree: for all 16 settings of en1..en4 counts the rising edges on
// every leaf clock over a window of root cycles and checks the gating rule:
// N2 runs with en1, N1 with en2 and en3, N3 with en2 and en4. Also checks that
// the leaves of one subtree are in phase with the root clock.
module tb_dm_clock_tree;
  import cg_pkg::*;
  localparam int WIN = 6;

  logic                 clk = 1'b0;
  en_t                  en;
  logic [N1_LEAVES-1:0] n1_clk;
  logic [N2_LEAVES-1:0] n2_clk;
  logic [N3_LEAVES-1:0] n3_clk;
  int                   checks = 0, failures = 0;
  int                   c1 [N1_LEAVES], c2 [N2_LEAVES], c3 [N3_LEAVES];

  dm_clock_tree dut (.clk(clk), .en(en), .n1_clk(n1_clk), .n2_clk(n2_clk), .n3_clk(n3_clk));

  always #5 clk = ~clk;

  for (genvar i = 0; i < N1_LEAVES; i++) begin : g_c1
    always @(posedge n1_clk[i]) c1[i]++;
  end
  for (genvar i = 0; i < N2_LEAVES; i++) begin : g_c2
    always @(posedge n2_clk[i]) c2[i]++;
  end
  for (genvar i = 0; i < N3_LEAVES; i++) begin : g_c3
    always @(posedge n3_clk[i]) c3[i]++;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = '0;
    for (int s = 0; s < 16; s++) begin
      int e1, e2, e3;
      @(negedge clk);
      en = en_t'(s[3:0]);
      foreach (c1[i]) c1[i] = 0;
      foreach (c2[i]) c2[i] = 0;
      foreach (c3[i]) c3[i] = 0;
      repeat (WIN) begin
        @(posedge clk); #1;
        checks++;
        if (n2_clk !== {N2_LEAVES{en.en1}}) begin failures++; $display("N2 level %b", n2_clk); end
      end
      @(negedge clk);
      e1 = (en.en2 && en.en3) ? WIN : 0;
      e2 = en.en1 ? WIN : 0;
      e3 = (en.en2 && en.en4) ? WIN : 0;
      foreach (c1[i]) begin checks++; if (c1[i] != e1) begin failures++; $display("N1[%0d] %0d/%0d en=%b", i, c1[i], e1, en); end end
      foreach (c2[i]) begin checks++; if (c2[i] != e2) begin failures++; $display("N2[%0d] %0d/%0d en=%b", i, c2[i], e2, en); end end
      foreach (c3[i]) begin checks++; if (c3[i] != e3) begin failures++; $display("N3[%0d] %0d/%0d en=%b", i, c3[i], e3, en); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
