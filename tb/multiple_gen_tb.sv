// multiple_gen_tb: checks the multiple generator.
//
// For every digit a in [-21, 42], both signs, and random operands X
// (including 0 and all ones), with and without the exact negative, checks us + uc + inj == (neg ? -a : a) * X
// modulo 2^W, with the product computed by the bench's own multiplication.
module multiple_gen_tb;
  import mexp_pkg::*;

  localparam int unsigned W = 44;

  digit_t       a;
  logic         neg;
  logic [W-1:0] x, xn, us, uc;
  logic         xn_ok;
  logic [1:0]   inj;

  int checks = 0, failures = 0;

  multiple_gen #(.W(W)) dut (.*);

  initial begin
    logic [W-1:0] want, got;
    for (int av = -21; av <= 42; av++) begin
      for (int ng = 0; ng < 2; ng++) begin
        for (int r = 0; r < 20; r++) begin
          a   = digit_t'(av);
          neg = ng[0];
          xn_ok = r[0];
          x   = {$urandom, $urandom};
          if (r == 0) x = '0;
          if (r == 1) x = '1;
          xn = -x;
          #1;
          want = W'(longint'(ng ? -av : av) * longint'({20'd0, x}));
          got  = us + uc + W'(inj);
          checks++;
          if (got !== want || inj == 2'd3 || (xn_ok && inj != 0)) begin
            failures++;
            $display("FAIL a=%0d neg=%0d x=%h got %h want %h inj=%0d", av, ng, x, got, want, inj);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
