// digit_recoder: recodes a radix-32 digit into three radix-4 digits.
//
// A digit a in [-21, 42] is written as a = 16*d2 + 4*d1 + d0 with every
// d_i in {-1, 0, 1, 2}, so that the multiple a*X is the sum of three
// shifted copies of X, -X, 2X or 0 (the multiplexing network of the
// multiple generator). The recoding works from the least significant
// radix-4 digit: d0 = ((a + 1) mod 4) - 1, then the same on (a - d0) / 4,
// and the remaining quotient is d2. The digit set {-1,0,1,2} and the
// 16/4/1 weights follow the published radix-32 design; the exact recoding
// rule (this one-step, borrow-based rule) is this design's choice.
//
// When neg is set the outputs are negated (-d_i, in {-2..1}); this serves
// the -q*2^(K+R)*N multiple with q in [0, 42].
//
// Interface: a (two's complement, 7 bits), neg; outputs d2, d1, d0.
// Purely combinational.
module digit_recoder
  import mexp_pkg::*;
(
  input  digit_t   a,
  input  logic     neg,
  output r4digit_t d2,
  output r4digit_t d1,
  output r4digit_t d0
);
  digit_t   a1, a2;
  r4digit_t e0, e1, e2;

  // Low radix-4 digit of v in {-1,0,1,2}: the two low bits, with 3 -> -1.
  function automatic r4digit_t low_digit(digit_t v);
    return (v[1:0] == 2'b11) ? r4digit_t'(-1) : r4digit_t'({1'b0, v[1:0]});
  endfunction

  always_comb begin
    e0 = low_digit(a);
    a1 = (a - digit_t'(e0)) >>> 2;
    e1 = low_digit(a1);
    a2 = (a1 - digit_t'(e1)) >>> 2;
    e2 = r4digit_t'(a2);
    d0 = neg ? -e0 : e0;
    d1 = neg ? -e1 : e1;
    d2 = neg ? -e2 : e2;
  end
endmodule
