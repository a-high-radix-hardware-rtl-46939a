// modmul_unit: pipelined radix-32 modulo multiplication unit.
//
// Computes two modulo products at once, R0 = A0*B and R1 = A1*B modulo N,
// sharing the multiplicand B and the modulus N. Each product follows the
// loop
//     S := 0
//     for i = ND-1 downto -2:
//         q := Estimate(S div 2^R*N)
//         S := 2^K*S + a_i*B - 2^(K+R)*q*N
// with a_-1 = a_-2 = 0, and the result is S div 2^(2K), which lies in
// [0, 2N). All operands stay in carry-save form: S, B and the multipliers
// are pairs of words and are never added across their length.
//
// One loop iteration of one product takes three hardware slots, each
// using the single multiple generator and the single 4-2 adder once:
//   slot A: U := a*Bs            ; S := V + U   (U from slot C: -q*N term)
//   slot B: U := a*Bc            ; V := 2^K*S + U ; q := Estimate(S)
//   slot C: U := -2^(K+R)*q*N    ; V := V + U   ; a := NextDigit(A)
// The two products alternate cycle by cycle (A0 A1 B0 B1 C0 C1), so one
// iteration of both takes six cycles, and U passes through a two-stage
// pipeline so that each product's 4-2 addition uses the multiple generated
// for it two cycles earlier. Each product has its own S, V, q and digit
// registers. The slot schedule is the published one; the cycle-by-cycle
// interleaving of the two products, and its two-stage U pipeline, are this
// design's way of sharing one unit between two multiplications.
//
// The modulus is held both as 2^(K+R)*N and, in two's complement, as
// -2^(K+R)*N (formed once when the modulus is loaded), so the -q*N multiple
// is formed exactly, with its low K+R bits zero. This is what makes the low
// 2K bits of both result words zero after the two final iterations, so that
// the result is read by dropping them.
//
// Operand format: an m = n+1 bit word x_s and an m+1 bit word x_c whose top
// bit weighs -2^m; value x_s + x_c[m-1:0] - x_c[m]*2^m. The result words are
// formed from S div 2^(2K) the same way: since the result is below 2^m, the
// carry into bit m of the two words equals the XOR of their bit m, which
// becomes the negative top bit of r_c. This exact repacking is this
// design's choice.
//
// Timing: pulse n_load with N once per modulus and wait for ready (QMAX
// cycles). Then pulse start with A0, A1, B (held only during the start
// cycle). done pulses 6*(ND+2)+4 cycles after start, with the results on
// r0_*/r1_*, which stay valid until the next start.
module modmul_unit
  import mexp_pkg::*;
#(
  parameter int unsigned NB = 512   // operand length n (at least 8)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          n_load,
  input  logic [NB-1:0] n_val,
  output logic          ready,
  input  logic          start,
  input  logic [NB:0]   a0_s,
  input  logic [NB+1:0] a0_c,
  input  logic [NB:0]   a1_s,
  input  logic [NB+1:0] a1_c,
  input  logic [NB:0]   b_s,
  input  logic [NB+1:0] b_c,
  output logic          busy,
  output logic          done,
  output logic [NB:0]   r0_s,
  output logic [NB+1:0] r0_c,
  output logic [NB:0]   r1_s,
  output logic [NB+1:0] r1_c
);
  localparam int unsigned W  = acc_width(NB);
  localparam int unsigned M  = NB + 1;
  localparam int unsigned ND = num_digits(NB);
  localparam int unsigned FW = $clog2(ND + 3);

  typedef enum logic [1:0] {ST_IDLE, ST_PRE, ST_RUN, ST_FIN} state_e;

  typedef struct packed {
    logic [W-1:0] s;
    logic [W-1:0] c;
    logic [1:0]   inj;
  } cs_mult_t;

  state_e          state;
  logic [2:0]      ph;          // 0..5
  logic [FW-1:0]   frame;       // iterations done
  logic            est_ready;

  logic [W-1:0]    nsh;         // 2^(K+R) * N
  logic [W-1:0]    nsh_neg;     // -2^(K+R) * N, two's complement
  logic [W-1:0]    bs_x, bc_x;  // B words sign-extended to W
  logic [W-1:0]    ss [2];
  logic [W-1:0]    sc [2];
  logic [W-1:0]    vs [2];
  logic [W-1:0]    vc [2];
  digit_t          a   [2];
  logic [QBITS-1:0] q  [2];

  cs_mult_t        u1, u2, g;
  logic            t;           // thread of this cycle
  slot_e           slot;
  logic            active;

  digit_t          gen_digit;
  logic            gen_neg;
  logic            gen_exact;
  logic [W-1:0]    gen_x;
  logic [W-1:0]    ax0, ax1, as_s, as_c;
  logic [QBITS-1:0] q_est;
  digit_t          nd [2];
  logic            dstep [2];

  assign t      = ph[0];
  assign slot   = slot_e'(ph[2:1]);
  assign active = (state == ST_RUN) || (state == ST_FIN);
  assign busy   = (state != ST_IDLE);
  assign ready  = est_ready;

  // ---------------------------------------------------------------- digits
  for (genvar th = 0; th < 2; th++) begin : g_dig
    mult_digit_gen #(.NB(NB)) u_dig (
      .clk  (clk),
      .rst_n(rst_n),
      .load (start && state == ST_IDLE),
      .a_s  (th == 0 ? a0_s : a1_s),
      .a_c  (th == 0 ? a0_c : a1_c),
      .step (dstep[th]),
      .digit(nd[th])
    );
    assign dstep[th] = (state == ST_PRE) ||
                       (state == ST_RUN && slot == SLOT_C && t == 1'(th));
  end

  // ------------------------------------------------- quotient estimation
  quotient_estimator #(.NB(NB)) u_est (
    .clk  (clk),
    .rst_n(rst_n),
    .load (n_load),
    .n_val(n_val),
    .ready(est_ready),
    .s_top(ss[t][W-1 -: EST_BITS]),
    .c_top(sc[t][W-1 -: EST_BITS]),
    .q    (q_est)
  );

  // ---------------------------------------------------- multiple generator
  always_comb begin
    unique case (slot)
      SLOT_A:  begin gen_x = bs_x; gen_digit = a[t];           gen_neg = 1'b0; gen_exact = 1'b0; end
      SLOT_B:  begin gen_x = bc_x; gen_digit = a[t];           gen_neg = 1'b0; gen_exact = 1'b0; end
      default: begin gen_x = nsh;  gen_digit = digit_t'(q[t]); gen_neg = 1'b1; gen_exact = 1'b1; end
    endcase
  end

  multiple_gen #(.W(W)) u_gen (
    .a(gen_digit), .neg(gen_neg), .x(gen_x), .xn(nsh_neg), .xn_ok(gen_exact),
    .us(g.s), .uc(g.c), .inj(g.inj)
  );

  // ------------------------------------------------------------ 4-2 adder
  always_comb begin
    if (slot == SLOT_B) begin
      ax0 = ss[t] << K;
      ax1 = sc[t] << K;
    end else begin
      ax0 = vs[t];
      ax1 = vc[t];
    end
  end

  adder_4_2 #(.W(W)) u_add (
    .x0(ax0), .x1(ax1), .x2(u2.s), .x3(u2.c), .inj(u2.inj), .s(as_s), .c(as_c)
  );

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      ph    <= '0;
      frame <= '0;
      done  <= 1'b0;
      nsh   <= '0;
      nsh_neg <= '0;
      bs_x  <= '0;
      bc_x  <= '0;
      u1    <= '0;
      u2    <= '0;
      for (int i = 0; i < 2; i++) begin
        ss[i] <= '0; sc[i] <= '0; vs[i] <= '0; vc[i] <= '0;
        a[i]  <= '0; q[i]  <= '0;
      end
    end else begin
      done <= 1'b0;
      if (n_load) begin
        nsh     <= W'(n_val) << (K + R);
        nsh_neg <= -(W'(n_val) << (K + R));
      end
      unique case (state)
        ST_IDLE: if (start) begin
          state <= ST_PRE;
          bs_x  <= W'(b_s);
          bc_x  <= W'(signed'(b_c));
          u1    <= '0;
          u2    <= '0;
          ph    <= '0;
          frame <= '0;
          for (int i = 0; i < 2; i++) begin
            ss[i] <= '0; sc[i] <= '0; vs[i] <= '0; vc[i] <= '0; q[i] <= '0;
          end
        end
        ST_PRE: begin
          a[0]  <= nd[0];
          a[1]  <= nd[1];
          state <= ST_RUN;
        end
        default: ;
      endcase

      if (active) begin
        u1 <= g;
        u2 <= u1;
        unique case (slot)
          SLOT_A: begin ss[t] <= as_s; sc[t] <= as_c; end
          SLOT_B: begin vs[t] <= as_s; vc[t] <= as_c; q[t] <= q_est; end
          default: begin vs[t] <= as_s; vc[t] <= as_c; a[t] <= nd[t]; end
        endcase
        ph <= (ph == 3'd5) ? 3'd0 : ph + 3'd1;
        if (state == ST_RUN && ph == 3'd5) begin
          frame <= frame + 1'b1;
          if (frame == FW'(ND + 1)) state <= ST_FIN;
        end
        if (state == ST_FIN && ph == 3'd1) begin
          state <= ST_IDLE;
          done  <= 1'b1;
        end
      end
    end
  end

  // --------------------------------------------------------- result words
  always_comb begin
    r0_s = ss[0][2*K +: M];
    r0_c = {ss[0][W-1] ^ sc[0][W-1], sc[0][2*K +: M]};
    r1_s = ss[1][2*K +: M];
    r1_c = {ss[1][W-1] ^ sc[1][W-1], sc[1][2*K +: M]};
  end

  // The two-product schedule has no room for a new start while busy.
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> state == ST_IDLE);
endmodule
