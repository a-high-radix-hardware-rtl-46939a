// mult_digit_gen_tb: checks the multiplier digit unit.
//
// Loads random multipliers A in [0, 2^(n+1)) in random
// carry-save splits, including splits with the negative top bit set and
// splits that make many slice carries, then steps through ND + 2 digits.
// n = 44 makes m = 45 a multiple of 5, so the top slices are full width.
// Checks that every digit lies in [-21, 42] (first digit in [-1, 31], the
// others in [0, 32]), that the two trailing digits are 0, and that
// sum a_i * 32^i equals A. A negative first digit must occur at least once.
module mult_digit_gen_tb;
  import mexp_pkg::*;

  localparam int unsigned NB = 44;
  localparam int unsigned M  = NB + 1;
  localparam int unsigned ND = num_digits(NB);

  logic         clk = 1'b0;
  logic         rst_n, load, step;
  logic [M-1:0] a_s;
  logic [M:0]   a_c;
  digit_t       digit;

  int checks = 0, failures = 0;
  int n_negfirst = 0;

  always #5 clk = ~clk;

  mult_digit_gen #(.NB(NB)) dut (.*);

  initial begin
    logic [M-1:0] av, sv;
    logic signed [63:0] acc;
    rst_n = 1'b0; load = 1'b0; step = 1'b0; a_s = '0; a_c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 400; r++) begin
      av = M'({$urandom, $urandom}) % ((M'(1) << NB) * 2 - 2);
      sv = M'({$urandom, $urandom});
      case (r % 5)
        0: sv = '1;            // all-ones word: long carry chains
        1: sv = '0;
        2: av = '0;
        default: ;
      endcase
      if (r == 3) begin av = '0; sv = '1; end
      a_s = sv;
      a_c = (M+1)'({1'b0, av} - {1'b0, sv});
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      acc = 0;
      for (int i = 0; i < int'(ND) + 2; i++) begin
        checks++;
        if ((i == 0 && (digit < -1 || digit > 31)) ||
            (i > 0 && (digit < 0 || digit > 32)) ||
            (i >= int'(ND) && digit != 0)) begin
          failures++;
          $display("FAIL digit %0d = %0d out of range (A=%h)", i, digit, av);
        end
        if (i == 0 && digit < 0) n_negfirst++;
        if (i < int'(ND)) acc = acc * 32 + 64'(digit);
        step = 1'b1;
        @(negedge clk);
        step = 1'b0;
      end
      checks++;
      if (acc != $signed(64'(av))) begin
        failures++;
        $display("FAIL digits sum to %h, A=%h (s=%h c=%h)", acc, av, a_s, a_c);
      end
    end
    checks++;
    if (n_negfirst == 0) begin
      failures++;
      $display("FAIL no negative first digit was produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
