// tb_sm_match_checker: drives the checker with three pairs of test functions of
// the scanned pattern. Run 1: pairs 0 and 2 agree everywhere, pair 1 differs
// on one pattern only (so a checker that stops early or drops the last or any
// pattern is caught). Run 2: pair 0 differs only on the last pattern, pair 1
// only on the first. Run 3: all agree. Each run checks the result, `busy`,
// and that `done` rises exactly 2**NIN + 1 rising edges after start. The
// checker runs at its default sizes, NIN = 4 and K = 3, mirrored here.
module tb_sm_match_checker;
  localparam int unsigned NIN = 4;
  localparam int unsigned K   = 3;

  logic           clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [NIN-1:0] pattern;
  logic [K-1:0]   sub_val, node_val;
  logic           busy, done;
  logic [K-1:0]   match;
  int             checks = 0, failures = 0;
  int             bad_pat [K];   // pattern on which pair k differs, -1: never

  sm_match_checker dut (
    .clk(clk), .rst_n(rst_n), .start(start), .pattern(pattern),
    .sub_val(sub_val), .node_val(node_val),
    .busy(busy), .done(done), .match(match)
  );

  always #5 clk = ~clk;

  // Pair k: subtree = majority-like function, node = same but flipped on bad_pat[k].
  always_comb begin
    for (int k = 0; k < K; k++) begin
      sub_val[k]  = ^pattern ^ pattern[k];
      node_val[k] = sub_val[k] ^ (int'(pattern) == bad_pat[k]);
    end
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int b0, input int b1, input int b2);
    int cycles;
    logic [K-1:0] exp;
    bad_pat[0] = b0; bad_pat[1] = b1; bad_pat[2] = b2;
    exp = {b2 < 0, b1 < 0, b0 < 0};
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    checks++;
    if (!busy) begin failures++; $display("busy not set after start"); end
    while (!done && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    checks += 2;
    if (cycles != (1 << NIN) + 1) begin
      failures++; $display("latency %0d, expected %0d", cycles, (1 << NIN) + 1);
    end
    if (match !== exp) begin
      failures++; $display("match %b, expected %b", match, exp);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (!done || match !== exp) begin failures++; $display("result not held"); end
  endtask

  initial begin
    bad_pat[0] = -1; bad_pat[1] = -1; bad_pat[2] = -1;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (done || busy) begin failures++; $display("not idle after reset"); end
    run(-1, 9, -1);
    run(15, 0, -1);
    run(-1, -1, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
