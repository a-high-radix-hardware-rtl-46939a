// multiple_gen: unit for generating a multiple, d*X, in carry-save form.
//
// The radix-32 digit is first recoded into three radix-4 digits
// (digit_recoder), d = 16*d2 + 4*d1 + d0 with d_i in {-2..2}. A multiplexing
// network then forms the three shifted terms 16*d2*X, 4*d1*X and d0*X, each
// being 0, X, 2X or its bitwise complement, and a carry-save adder reduces
// them to the pair (us, uc). This is the structure of the published
// multiple generator (recoder, multiplexing network, carry-save adder).
//
// Negative terms come in two ways. When the exact negative of the operand
// is at hand (xn_ok, used for the modulus, which is kept both as N and in
// two's complement as -N), a negative term is simply a shifted copy of xn
// and the result is exact. Otherwise (the carry-save multiplicand words) a
// negative term is the bitwise complement of the shifted term, which equals
// -term - 1 modulo 2^W; the missing +1 per negative term is this design's
// own bookkeeping: the first is put into the free bit 0 of the carry word,
// the others are returned on inj (a count of 0..2) and are added by the 4-2
// adder in its own free carry bits. In both cases, modulo 2^W,
//     us + uc + inj == (neg ? -a : a) * X.
// With xn_ok and an operand whose low bits are zero, the low bits of us and
// uc stay zero, which the multiplication relies on for its last two
// iterations.
//
// The same unit forms a*Bs, a*Bc and -q*2^(K+R)*N; the caller supplies X
// (and xn) already sign-extended and shifted to W bits. Purely
// combinational.
module multiple_gen
  import mexp_pkg::*;
#(
  parameter int unsigned W = 524
) (
  input  digit_t       a,     // digit, [-21, 42]
  input  logic         neg,   // form -a*X instead of a*X
  input  logic [W-1:0] x,     // operand, two's complement, W bits
  input  logic [W-1:0] xn,    // -x modulo 2^W, used when xn_ok
  input  logic         xn_ok, // xn is valid: form negative terms exactly
  output logic [W-1:0] us,    // carry-save sum word
  output logic [W-1:0] uc,    // carry-save carry word
  output logic [1:0]   inj    // +1 corrections still to be added (0..2)
);
  r4digit_t d2, d1, d0;
  logic [W-1:0] t2, t1, t0;
  logic [1:0]   nneg;

  digit_recoder u_rec (.a(a), .neg(neg), .d2(d2), .d1(d1), .d0(d0));

  // One term of the multiplexing network: d*(x << sh), d in {-2..2}.
  function automatic logic [W-1:0] term(r4digit_t d, logic [W-1:0] v,
                                        logic [W-1:0] vn, logic vn_ok,
                                        int unsigned sh);
    logic [W-1:0] m;
    logic [W-1:0] src;
    src = (d < 0 && vn_ok) ? vn : v;
    case (d)
      3'sd1, -3'sd1: m = src << sh;
      3'sd2, -3'sd2: m = src << (sh + 1);
      default:       m = '0;
    endcase
    return (d < 0 && !vn_ok) ? ~m : m;
  endfunction

  always_comb begin
    t2   = term(d2, x, xn, xn_ok, 4);
    t1   = term(d1, x, xn, xn_ok, 2);
    t0   = term(d0, x, xn, xn_ok, 0);
    nneg = xn_ok ? 2'd0 : 2'(d2 < 0) + 2'(d1 < 0) + 2'(d0 < 0);
    inj  = (nneg == 2'd0) ? 2'd0 : nneg - 2'd1;
  end

  csa #(.W(W)) u_csa (
    .x(t2), .y(t1), .z(t0), .cin(nneg != 2'd0), .s(us), .c(uc)
  );
endmodule
