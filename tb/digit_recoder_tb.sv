// digit_recoder_tb: exhaustive check of the radix-32 to radix-4 recoding.
//
// For every a in [-21, 42] and both values of neg, checks that each output
// digit lies in {-1, 0, 1, 2} (negated: {-2, -1, 0, 1}) and that
// 16*d2 + 4*d1 + d0 equals a (or -a).
module digit_recoder_tb;
  import mexp_pkg::*;

  digit_t   a;
  logic     neg;
  r4digit_t d2, d1, d0;

  int checks = 0, failures = 0;

  digit_recoder dut (.*);

  function automatic bit in_set(r4digit_t d, bit ng);
    int v;
    v = ng ? -int'(d) : int'(d);
    return v >= -1 && v <= 2;
  endfunction

  initial begin
    for (int av = -21; av <= 42; av++) begin
      for (int ng = 0; ng < 2; ng++) begin
        a = digit_t'(av);
        neg = ng[0];
        #1;
        checks++;
        if (16 * int'(d2) + 4 * int'(d1) + int'(d0) != (ng ? -av : av) ||
            !in_set(d2, ng[0]) || !in_set(d1, ng[0]) || !in_set(d0, ng[0])) begin
          failures++;
          $display("FAIL a=%0d neg=%0d -> %0d %0d %0d", av, ng, d2, d1, d0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
