// mexp_pkg: constants and small types shared by the radix-32 modulo
// exponentiation datapath.
//
// The radix is 2^K with K = 5, the quotient-divisor shift is R = K, and the
// quotient digit q ranges over 0..QMAX with QMAX = 42, as in the published
// radix-32 configuration. These three numbers shape the digit recoding
// (three radix-4 digits in {-1,0,1,2}) and are therefore fixed here rather
// than left as module parameters; only the operand length n is a parameter
// of the modules.
package mexp_pkg;

  localparam int unsigned K    = 5;   // bits per multiplier digit (radix 32)
  localparam int unsigned R    = 5;   // divisor is 2^R * N, with R = K
  localparam int unsigned QMAX = 42;  // largest quotient digit

  // Number of top bits of S used by the quotient estimate: bit positions
  // n .. p with p = n + R + K + 1, i.e. p - n + 1 = K + R + 2 = 12.
  localparam int unsigned EST_BITS = K + R + 2;

  // Bits of a quotient digit (0..42).
  localparam int unsigned QBITS = 6;

  // A radix-32 multiplier or quotient digit, two's complement.  Multiplier
  // digits lie in [-1, 32]; the recoder accepts [-21, 42].
  typedef logic signed [6:0] digit_t;

  // A radix-4 digit after recoding, in {-2, -1, 0, 1, 2} (the sign is
  // flipped for the -q*N multiple, so -2 occurs there).
  typedef logic signed [2:0] r4digit_t;

  // Width of the carry-save accumulator S for operand length n:
  // bits 0 .. p with p = n + R + K + 1.
  function automatic int unsigned acc_width(int unsigned n);
    return n + R + K + 2;
  endfunction

  // Number of radix-32 digits of a multiplier A in [0, 2N): ceil((n+1)/K).
  function automatic int unsigned num_digits(int unsigned n);
    return (n + 1 + K - 1) / K;
  endfunction

  // The six phases of a two-multiplication iteration (Fig. "iteration
  // sequence"): three slots per multiplication, the two multiplications
  // alternating cycle by cycle.
  typedef enum logic [1:0] {
    SLOT_A = 2'd0,  // U := a*Bs            ; S := V + U
    SLOT_B = 2'd1,  // U := a*Bc            ; V := 2^K*S + U ; q := Estimate(S)
    SLOT_C = 2'd2   // U := -2^(K+R)*q*N    ; V := V + U     ; a := NextDigit(A)
  } slot_e;

endpackage
