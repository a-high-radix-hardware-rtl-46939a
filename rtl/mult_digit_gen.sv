// mult_digit_gen: NextDigit(As, Ac), the multiplier digit unit.
//
// Holds a multiplier A in carry-save form and delivers its radix-32 digits
// most significant first, without ever adding the two words across their
// full length. A is given as a_s (m = n+1 bits, unsigned) and a_c (m+1
// bits, whose top bit has weight -2^m), so A = a_s + a_c[m-1:0] - a_c[m]*2^m
// and 0 <= A < 2N.
//
// The words sit left-aligned in two shift registers of ND*K bits
// (ND = ceil((n+1)/K) digits). The current digit is formed from the top
// K-bit slices of both words plus the carry out of the sum of the next
// slices:
//     a = (Ts + Tc) mod 2^K + carry(Ns + Nc)
// so every digit after the first lies in [0, 2^K]. The first digit keeps
// the full top-slice sum and absorbs the negative weight of a_c[m]; it lies
// in [-1, 2^K - 1]. The digits then satisfy sum a_i*32^i == A exactly, and
// all of them fit the multiple generator's digit set [-21, 42]. After the
// ND digits the registers are empty and the unit delivers zeros, which are
// the two extra digits a_-1 = a_-2 = 0 of the multiplication loop.
// The two-slice window rule is this design's choice; the published design
// only states that the digit is recoded from the carry-save words with
// limited carry propagation.
//
// Timing: load takes the words at a clock edge; digit is combinational
// from the registers and shows the next digit; step shifts to the digit
// after it at the next edge.
module mult_digit_gen
  import mexp_pkg::*;
#(
  parameter int unsigned NB = 512   // operand length n (at least 8)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [NB:0]   a_s,     // m = NB+1 bits
  input  logic [NB+1:0] a_c,     // m+1 bits, top bit weighs -2^m
  input  logic          step,
  output digit_t        digit
);
  localparam int unsigned M  = NB + 1;
  localparam int unsigned ND = num_digits(NB);
  localparam int unsigned DW = ND * K;
  // Weight of -2^m in units of the top digit: 2^(M - K*(ND-1)).
  localparam int unsigned SB = M - K * (ND - 1);

  logic [DW-1:0] ws, wc;
  logic          sgn;      // -2^m still to be absorbed
  logic          first;    // current digit is the most significant one

  logic [K:0]   top_sum, nxt_sum;
  digit_t       top_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws    <= '0;
      wc    <= '0;
      sgn   <= 1'b0;
      first <= 1'b0;
    end else if (load) begin
      ws    <= DW'(a_s);
      wc    <= DW'(a_c[M-1:0]);
      sgn   <= a_c[M];
      first <= 1'b1;
    end else if (step) begin
      ws    <= ws << K;
      wc    <= wc << K;
      sgn   <= 1'b0;
      first <= 1'b0;
    end
  end

  always_comb begin
    top_sum = (K+1)'(ws[DW-1 -: K]) + (K+1)'(wc[DW-1 -: K]);
    nxt_sum = (K+1)'(ws[DW-K-1 -: K]) + (K+1)'(wc[DW-K-1 -: K]);
    top_val = first ? digit_t'(top_sum) : digit_t'(top_sum[K-1:0]);
    digit   = top_val + digit_t'(nxt_sum[K])
            - (sgn ? digit_t'(1 << SB) : digit_t'(0));
  end
endmodule
