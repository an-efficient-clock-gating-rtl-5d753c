// tb_existing_nodes: exhaustive check of the three existing nodes over all
// 256 values of a..h against reference functions written differently
// (n2 as a majority count, n1 and n3 as products of sums).
module tb_existing_nodes;
  import cg_pkg::*;

  gvars_t v;
  logic   n1, n2, n3;
  int     checks = 0, failures = 0;

  existing_nodes dut (.v(v), .n1(n1), .n2(n2), .n3(n3));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      logic e1, e2, e3;
      int   cnt;
      v   = gvars_t'(i[7:0]);
      #1;
      cnt = int'(v.a) + int'(v.b) + int'(v.c);
      e1  = (v.c == 1'b1) && (v.a || v.b);
      e2  = (cnt >= 2);
      e3  = (v.a || v.b) && (v.c || v.d);
      checks += 3;
      if (n1 !== e1) begin failures++; $display("n1 mismatch at %0d", i); end
      if (n2 !== e2) begin failures++; $display("n2 mismatch at %0d", i); end
      if (n3 !== e3) begin failures++; $display("n3 mismatch at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
