// tb_sm_gating_logic: exhaustive check of the strong-matched gating function and the
// three reused nodes over all 256 values of a..h. The reference F is evaluated as
// a case split on the control variables h, f, e, g.
module tb_sm_gating_logic;
  import cg_pkg::*;

  gvars_t v;
  logic   n1, n2, n3, f_out;
  int     checks = 0, failures = 0;

  sm_gating_logic dut (.v(v), .n1(n1), .n2(n2), .n3(n3), .f_out(f_out));

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

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones = 0;
    for (int i = 0; i < 256; i++) begin
      v = gvars_t'(i[7:0]);
      #1;
      checks += 4;
      if (n1 !== (v.c && (v.a || v.b)))                      begin failures++; $display("n1 @%0d", i); end
      if (n2 !== ((int'(v.a) + int'(v.b) + int'(v.c)) >= 2)) begin failures++; $display("n2 @%0d", i); end
      if (n3 !== ((v.a || v.b) && (v.c || v.d)))             begin failures++; $display("n3 @%0d", i); end
      if (f_out !== ref_f(v))                                 begin failures++; $display("F @%0d", i); end
      if (f_out) ones++;
    end
    $display("F is 1 on %0d of 256 inputs", ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
