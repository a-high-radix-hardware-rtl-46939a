// est_cell: one cell of the quotient estimation unit.
//
// Computes the sign of the top bits of S - q*2^R*N for one fixed q. The
// inputs are bit fields n .. p of the accumulator words Ss and Sc and of
// the two's complement constant -q*2^R*N (held in the cell's register,
// loaded by the quotient estimator). A carry-save adder reduces the three
// fields to two and a carry-ripple adder adds those; the sign is the top
// bit of the EB-bit sum. This follows the published cell (register,
// carry-save adder, carry-ripple circuit, sign out); the ripple is written
// as a chain of full adders.
//
// neg is 1 when the truncated S - q*2^R*N is negative. Combinational
// apart from the register, which the parent writes through ld/ld_val.
module est_cell
  import mexp_pkg::*;
#(
  parameter int unsigned EB = EST_BITS
) (
  input  logic          clk,
  input  logic          ld,        // load the constant register
  input  logic [EB-1:0] ld_val,    // bits n..p of -q*2^R*N
  input  logic [EB-1:0] s_top,     // bits n..p of Ss
  input  logic [EB-1:0] c_top,     // bits n..p of Sc
  output logic          neg
);
  logic [EB-1:0] nq;          // the cell's register
  logic [EB-1:0] ps, pc;      // carry-save pair
  logic          cy;
  logic [EB-1:0] sum;

  always_ff @(posedge clk) begin
    if (ld) nq <= ld_val;
  end

  csa #(.W(EB)) u_csa (.x(s_top), .y(c_top), .z(nq), .cin(1'b0), .s(ps), .c(pc));

  // carry-ripple circuit
  always_comb begin
    cy = 1'b0;
    for (int i = 0; i < int'(EB); i++) begin
      sum[i] = ps[i] ^ pc[i] ^ cy;
      cy     = (ps[i] & pc[i]) | (ps[i] & cy) | (pc[i] & cy);
    end
    neg = sum[EB-1];
  end
endmodule
