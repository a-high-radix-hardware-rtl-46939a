// result_converter: final reduction and conversion of the exponentiation
// result.
//
// The exponentiation ends with X in carry-save form and only known to lie
// in [0, 2N). This unit walks through the two words serially, least
// significant bit first, one bit per clock: a bit-serial adder forms the
// bits of X = x_s + x_c, and a second bit-serial adder forms X - N (as
// X + ~N + 1) from those bits on the fly. After m = n+1 bits the carry out
// of the subtraction tells whether X >= N, and the result is X - N if so,
// else X. Doing the reduction during the serial pass follows the published
// design; the two serial adders and the parallel result register are this
// design's choice.
//
// Operand format as in modmul_unit: x_s (m bits) and x_c (m+1 bits, top bit
// weighs -2^m). The negative top bit needs no work: X < 2^m, so the m-bit
// sum of the words is X.
//
// Timing: pulse start with the operands and N; done pulses m+1 cycles
// later with result (n bits), which stays valid until the next start.
// subtracted shows whether N was subtracted.
module result_converter #(
  parameter int unsigned NB = 512   // operand length n
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NB:0]   x_s,
  input  logic [NB+1:0] x_c,
  input  logic [NB-1:0] n_val,
  output logic          busy,
  output logic          done,
  output logic [NB-1:0] result,
  output logic          subtracted
);
  localparam int unsigned M  = NB + 1;
  localparam int unsigned CW = $clog2(M + 1);

  logic [M-1:0]  xs, xc, nr;   // operand shift registers
  logic [M-1:0]  xr, dr;       // X and X - N, filled from the top
  logic          cy_a, cy_d;   // serial adder carries
  logic [CW-1:0] cnt;
  logic          xb, db, nb;

  always_comb begin
    xb = xs[0] ^ xc[0] ^ cy_a;
    nb = ~nr[0];
    db = xb ^ nb ^ cy_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs <= '0; xc <= '0; nr <= '0; xr <= '0; dr <= '0;
      cy_a <= 1'b0; cy_d <= 1'b0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; result <= '0; subtracted <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        xs   <= x_s;
        xc   <= x_c[M-1:0];
        nr   <= M'(n_val);
        cy_a <= 1'b0;
        cy_d <= 1'b1;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        xs   <= xs >> 1;
        xc   <= xc >> 1;
        nr   <= nr >> 1;
        xr   <= {xb, xr[M-1:1]};
        dr   <= {db, dr[M-1:1]};
        cy_a <= (xs[0] & xc[0]) | (xs[0] & cy_a) | (xc[0] & cy_a);
        cy_d <= (xb & nb) | (xb & cy_d) | (nb & cy_d);
        cnt  <= cnt + 1'b1;
        if (cnt == CW'(M - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          // carry out of X + ~N + 1 over m bits: X >= N
          subtracted <= (xb & nb) | (xb & cy_d) | (nb & cy_d);
          result     <= ((xb & nb) | (xb & cy_d) | (nb & cy_d))
                        ? NB'({db, dr[M-1:1]}) : NB'({xb, xr[M-1:1]});
        end
      end
    end
  end
endmodule
