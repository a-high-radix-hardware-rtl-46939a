// quotient_estimator: quotient digit estimate q = Estimate(S div 2^R*N).
//
// Parallel exhaustive search: one est_cell per q in 1..QMAX computes the
// sign of the top EST_BITS bits (positions n .. p) of S - q*2^R*N, with S
// given as its carry-save words. The estimate is the largest q whose
// truncated remainder is non-negative, 0 if there is none. Because the
// truncation drops only non-negative parts, the chosen q satisfies
//     0 <= S - q*2^R*N < 2^R*N + 3*2^n
// whenever 0 <= S < (QMAX+1)*2^R*N, which is the range the multiplication
// keeps S in. (A q = 0 cell would only test the sign of S itself and is not
// needed for the choice, so it is left out.)
//
// The cell constants -q*2^R*N (their top bits) must be loaded once per
// modulus. On a load pulse the unit takes n_val and then, over QMAX
// cycles, forms -q*2^R*N for q = 1, 2, .. by repeated subtraction in one
// full-width adder and writes the top bits into cell q. ready is low during
// those QMAX cycles and rises the cycle after the last write. How the cell
// registers are filled is not given by the published design; this
// sequential loader is this design's choice.
//
// The estimate itself is combinational from s_top/c_top to q.
module quotient_estimator
  import mexp_pkg::*;
#(
  parameter int unsigned NB = 512   // operand length n
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,      // start loading the cell constants
  input  logic [NB-1:0]       n_val,     // modulus N
  output logic                ready,     // cell constants valid
  input  logic [EST_BITS-1:0] s_top,     // bits n..p of Ss
  input  logic [EST_BITS-1:0] c_top,     // bits n..p of Sc
  output logic [QBITS-1:0]    q
);
  localparam int unsigned W = acc_width(NB);

  logic [W-1:0]       nsh;       // 2^R * N
  logic [W-1:0]       acc;       // -q * 2^R * N for the q being loaded
  logic [W-1:0]       acc_next;
  logic [QBITS-1:0]   cnt;       // q of the cell being loaded
  logic               busy;
  logic [QMAX:1]      neg;

  assign acc_next = acc - nsh;
  assign ready    = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      acc  <= '0;
      nsh  <= '0;
    end else if (load) begin
      busy <= 1'b1;
      cnt  <= QBITS'(1);
      acc  <= '0;
      nsh  <= W'(n_val) << R;
    end else if (busy) begin
      acc <= acc_next;
      cnt <= cnt + 1'b1;
      if (cnt == QBITS'(QMAX)) busy <= 1'b0;
    end
  end

  for (genvar g = 1; g <= int'(QMAX); g++) begin : g_cell
    est_cell #(.EB(EST_BITS)) u_cell (
      .clk   (clk),
      .ld    (busy && (cnt == QBITS'(g))),
      .ld_val(acc_next[W-1 -: EST_BITS]),
      .s_top (s_top),
      .c_top (c_top),
      .neg   (neg[g])
    );
  end

  // Largest q whose truncated remainder is non-negative.
  always_comb begin
    q = '0;
    for (int j = 1; j <= int'(QMAX); j++) begin
      if (!neg[j]) q = QBITS'(j);
    end
  end
endmodule
