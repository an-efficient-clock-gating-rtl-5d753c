// tb_icg_cell: checks that the gated clock passes exactly the rising edges
// whose enable was set before them, stays low otherwise, and that dropping the
// enable while the clock is high does not cut the current pulse short.
module tb_icg_cell;
  logic clk = 1'b0, en = 1'b0, gclk;
  int   checks = 0, failures = 0;
  int   edges = 0;

  icg_cell dut (.clk_in(clk), .en(en), .clk_out(gclk));

  always #5 clk = ~clk;
  always @(posedge gclk) edges++;

  initial begin : watchdog
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 1));
      if (en) exp++;
      @(posedge clk);
      #1;
      checks++;
      if (gclk !== en) begin failures++; $display("gclk %b with en %b at %0d", gclk, en, i); end
      // Drop the enable mid-pulse: the pulse must last the whole high phase.
      if (en && (i % 3 == 0)) begin
        en = 1'b0;
        #2;
        checks++;
        if (gclk !== 1'b1) begin failures++; $display("pulse cut at %0d", i); end
      end
    end
    @(negedge clk);
    checks++;
    if (edges != exp) begin failures++; $display("edges %0d expected %0d", edges, exp); end
    // Clock low: output low whatever the enable.
    en = 1'b1; #1;
    checks++;
    if (gclk !== 1'b0) begin failures++; $display("output high while clock low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
