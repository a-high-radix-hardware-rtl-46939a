// modexp_top_tb: end-to-end test of the modulo exponentiation at reduced
// operand length (NB = 32 by default of this bench).
//
// Runs a set of exponentiations (fixed corner cases and random ones) and
// compares each result with M^E mod N computed in the bench by
// square-and-multiply on double-width integers. Checks the total cycle
// count against (QMAX+3) + n*(6*(ND+2)+5) + (n+2). Also counts how often the
// design's mechanisms occur and fails if one never does: exponent bits 1
// and 0 (product kept / discarded), quotient digits 0, >0 and >= 32, a
// carry-save result word with its negative top bit set, and the final
// subtraction of N taken and not taken.
module modexp_top_tb;
  import mexp_pkg::*;

  localparam int unsigned NB  = 32;
  localparam int unsigned ND  = num_digits(NB);
  localparam int unsigned EXP_CYC = (QMAX + 3) + NB * (6 * (ND + 2) + 5) + (NB + 2);
  localparam int unsigned NRUN = 40;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          start;
  logic [NB-1:0] m_in, e_in, n_in;
  logic          busy, done;
  logic [NB-1:0] result;

  int checks = 0, failures = 0;
  int cnt_e1 = 0, cnt_e0 = 0, cnt_q0 = 0, cnt_qpos = 0, cnt_qbig = 0;
  int cnt_sgn = 0, cnt_sub = 0, cnt_nosub = 0;

  always #5 clk = ~clk;

  modexp_top #(.NB(NB)) dut (.*);

  // mechanism counters
  always @(posedge clk) begin
    if (dut.mm_done) begin
      if (dut.ereg[0]) cnt_e1++; else cnt_e0++;
      if (dut.r0_c[NB+1] || dut.r1_c[NB+1]) cnt_sgn++;
    end
    if (dut.u_mul.active && dut.u_mul.slot == SLOT_B) begin
      if (dut.u_mul.q_est == 0) cnt_q0++;
      else cnt_qpos++;
      if (dut.u_mul.q_est >= 32) cnt_qbig++;
    end
    if (dut.u_conv.done) begin
      if (dut.u_conv.subtracted) cnt_sub++; else cnt_nosub++;
    end
  end

  function automatic logic [NB-1:0] ref_exp(logic [NB-1:0] mm, logic [NB-1:0] ee,
                                           logic [NB-1:0] nn);
    logic [2*NB-1:0] x, y;
    x = 1;
    y = {{NB{1'b0}}, mm};
    for (int i = 0; i < int'(NB); i++) begin
      if (ee[i]) x = (x * y) % {{NB{1'b0}}, nn};
      y = (y * y) % {{NB{1'b0}}, nn};
    end
    return x[NB-1:0] % nn;
  endfunction

  function automatic logic [NB-1:0] rand_word();
    logic [NB-1:0] v;
    logic [NB+31:0] w;
    for (int i = 0; i < int'(NB); i += 32) w[i +: 32] = $urandom;
    v = w[NB-1:0];
    return v;
  endfunction

  task automatic run(logic [NB-1:0] mm, logic [NB-1:0] ee, logic [NB-1:0] nn);
    int cyc;
    logic [NB-1:0] exp_r;
    exp_r = ref_exp(mm, ee, nn);
    @(negedge clk);
    m_in = mm; e_in = ee; n_in = nn; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (result !== exp_r) begin
      failures++;
      $display("FAIL M=%h E=%h N=%h got %h expected %h", mm, ee, nn, result, exp_r);
    end
    checks++;
    if (cyc != int'(EXP_CYC)) begin
      failures++;
      $display("FAIL cycle count %0d, expected %0d", cyc, EXP_CYC);
    end
  endtask

  initial begin
    logic [NB-1:0] nn, mm, ee;
    rst_n = 1'b0; start = 1'b0; m_in = '0; e_in = '0; n_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // corner cases
    nn = {1'b1, {(NB-1){1'b1}}};           // largest N
    run(nn - 1, '1, nn);
    nn = {1'b1, {(NB-2){1'b0}}, 1'b1};     // smallest odd N
    run(nn - 1, '1, nn);
    run('0, rand_word(), nn);
    run(rand_word() % nn, '0, nn);
    for (int r = 0; r < int'(NRUN); r++) begin
      nn = rand_word() | {1'b1, {(NB-1){1'b0}}} | 1;
      mm = rand_word() % nn;
      ee = rand_word();
      run(mm, ee, nn);
    end
    // mechanisms
    checks++; if (cnt_e1 == 0)     begin failures++; $display("FAIL no e_i=1 step"); end
    checks++; if (cnt_e0 == 0)     begin failures++; $display("FAIL no e_i=0 step"); end
    checks++; if (cnt_q0 == 0)     begin failures++; $display("FAIL no q=0"); end
    checks++; if (cnt_qpos == 0)   begin failures++; $display("FAIL no q>0"); end
    checks++; if (cnt_qbig == 0)   begin failures++; $display("FAIL no q>=32"); end
    checks++; if (cnt_sgn == 0)    begin failures++; $display("FAIL no negative top bit in a result word"); end
    checks++; if (cnt_sub == 0)    begin failures++; $display("FAIL final subtraction never taken"); end
    checks++; if (cnt_nosub == 0)  begin failures++; $display("FAIL final subtraction always taken"); end
    $display("mechanisms: e1=%0d e0=%0d q0=%0d qpos=%0d qbig=%0d sgn=%0d sub=%0d nosub=%0d",
             cnt_e1, cnt_e0, cnt_q0, cnt_qpos, cnt_qbig, cnt_sgn, cnt_sub, cnt_nosub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NRUN + 5) * (EXP_CYC + 10)) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
