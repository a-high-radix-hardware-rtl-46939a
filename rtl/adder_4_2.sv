// adder_4_2: 4-2 adder built from two carry-save adders.
//
// Reduces four W-bit words (two carry-save pairs) to one carry-save pair:
// the first carry-save adder takes x0, x1, x2, the second takes its two
// outputs and x3. Each adder's carry word has a free bit 0, which takes one
// of the two injected +1s (inj, a count of 0..2), so that modulo 2^W
//     s + c == x0 + x1 + x2 + x3 + inj.
// Two cascaded carry-save adders follow the published datapath; the use of
// the free carry bits for +1 injection is this design's own.
// Purely combinational.
module adder_4_2 #(
  parameter int unsigned W = 524
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  input  logic [1:0]   inj,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] s1, c1;

  csa #(.W(W)) u_csa1 (.x(x0), .y(x1), .z(x2), .cin(inj != 2'd0), .s(s1), .c(c1));
  csa #(.W(W)) u_csa2 (.x(s1), .y(c1), .z(x3), .cin(inj == 2'd2),  .s(s),  .c(c));
endmodule
