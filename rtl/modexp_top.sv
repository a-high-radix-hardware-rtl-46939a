// modexp_top: modulo exponentiation X = M^E mod N with radix-32 modulo
// multiplication.
//
// The exponent is scanned from its least significant bit:
//     X := 1; Y := M
//     for i = 0 .. n-1:  if e_i: X := X*Y mod N ;  Y := Y*Y mod N
// The two products of one step do not depend on each other, so they are
// computed together on one modmul_unit (X*Y and Y*Y share the multiplicand
// Y and the modulus N), and a step always costs one multiplication time,
// whether e_i is 0 or 1. X and Y stay in carry-save form, in [0, 2N),
// throughout; only the final X is converted to binary and reduced below N
// by result_converter. This structure follows the published design; the
// control sequence below and the parallel operand ports are this design's
// choice.
//
// Interface: pulse start with m_in (M < N), e_in (E, n bits) and n_in
// (N, 2^(n-1) < N < 2^n), held during the start cycle. busy is high until
// done pulses; result then holds M^E mod N until the next start.
//
// Timing: from the start cycle to done, (QMAX+3) + n*(6*(ND+2)+5) + (n+2)
// cycles (ND = ceil((n+1)/5)): the modulus load into the quotient
// estimator, n multiplication steps, and the serial conversion. For
// n = 512 that is 325,679 cycles.
module modexp_top
  import mexp_pkg::*;
#(
  parameter int unsigned NB = 512   // operand length n (at least 8)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NB-1:0] m_in,
  input  logic [NB-1:0] e_in,
  input  logic [NB-1:0] n_in,
  output logic          busy,
  output logic          done,
  output logic [NB-1:0] result
);
  localparam int unsigned M  = NB + 1;
  localparam int unsigned BW = $clog2(NB + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_SETUP, S_MUL, S_WAIT, S_CONV, S_CONVWAIT
  } state_e;

  state_e        state;
  logic [NB-1:0] nreg;
  logic [NB-1:0] ereg;        // exponent, shifted right each step
  logic [BW-1:0] step_cnt;
  logic [M-1:0]  xs, ys;      // X and Y, carry-save
  logic [M:0]    xc, yc;
  logic          setup_wait;

  logic          mm_ready, mm_done, mm_start;
  logic [M-1:0]  r0_s, r1_s;
  logic [M:0]    r0_c, r1_c;
  logic          cv_start, cv_done;

  assign mm_start = (state == S_MUL);
  assign cv_start = (state == S_CONV);
  assign busy     = (state != S_IDLE);

  modmul_unit #(.NB(NB)) u_mul (
    .clk   (clk),
    .rst_n (rst_n),
    .n_load(start && state == S_IDLE),
    .n_val (n_in),
    .ready (mm_ready),
    .start (mm_start),
    .a0_s  (xs),   .a0_c(xc),   // X * Y
    .a1_s  (ys),   .a1_c(yc),   // Y * Y
    .b_s   (ys),   .b_c (yc),
    .busy  (),
    .done  (mm_done),
    .r0_s  (r0_s), .r0_c(r0_c),
    .r1_s  (r1_s), .r1_c(r1_c)
  );

  result_converter #(.NB(NB)) u_conv (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (cv_start),
    .x_s       (xs),
    .x_c       (xc),
    .n_val     (nreg),
    .busy      (),
    .done      (cv_done),
    .result    (result),
    .subtracted()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      nreg       <= '0;
      ereg       <= '0;
      step_cnt   <= '0;
      xs         <= '0;
      xc         <= '0;
      ys         <= '0;
      yc         <= '0;
      setup_wait <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          nreg       <= n_in;
          ereg       <= e_in;
          step_cnt   <= '0;
          xs         <= M'(1);
          xc         <= '0;
          ys         <= M'(m_in);
          yc         <= '0;
          setup_wait <= 1'b1;
          state      <= S_SETUP;
        end
        S_SETUP: begin
          // the estimator drops ready one cycle after the load pulse
          setup_wait <= 1'b0;
          if (!setup_wait && mm_ready) state <= S_MUL;
        end
        S_MUL: state <= S_WAIT;
        S_WAIT: if (mm_done) begin
          if (ereg[0]) begin
            xs <= r0_s;
            xc <= r0_c;
          end
          ys       <= r1_s;
          yc       <= r1_c;
          ereg     <= ereg >> 1;
          step_cnt <= step_cnt + 1'b1;
          state    <= (step_cnt == BW'(NB - 1)) ? S_CONV : S_MUL;
        end
        S_CONV: state <= S_CONVWAIT;
        S_CONVWAIT: if (cv_done) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
