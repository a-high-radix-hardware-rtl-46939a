// modmul_unit_tb: checks the pipelined two-product modulo multiplier.
//
// Loads a random modulus N (top bit set), then runs random products with
// A0, A1, B in [0, 2N), each given in a random carry-save split (including
// splits whose second word has its negative top bit set). For both
// products it checks that the result words sum to a value in [0, 2N) that
// is congruent to A*B modulo N, computed in the bench with double-width
// integers, and that done comes 6*(ND+2)+4 cycles after start. Also checks
// the QMAX-cycle modulus load, and that small multipliers in random splits
// produce a negative first digit (negative early partial product).
module modmul_unit_tb;
  import mexp_pkg::*;

  localparam int unsigned NB = 32;
  localparam int unsigned M  = NB + 1;
  localparam int unsigned ND = num_digits(NB);
  localparam int unsigned LAT = 6 * (ND + 2) + 4;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          n_load, start;
  logic [NB-1:0] n_val;
  logic          ready, busy, done;
  logic [M-1:0]  a0_s, a1_s, b_s, r0_s, r1_s;
  logic [M:0]    a0_c, a1_c, b_c, r0_c, r1_c;

  int checks = 0, failures = 0;
  int n_negfirst = 0;
  logic [M-1:0] sv_a0s, sv_bs;
  logic [M:0]   sv_a0c, sv_bc;

  always #5 clk = ~clk;

  // a negative first multiplier digit makes the partial product negative
  always @(posedge clk)
    if (dut.dstep[0] && !dut.active && ($signed(dut.nd[0]) < 0 || $signed(dut.nd[1]) < 0))
      n_negfirst++;

  modmul_unit #(.NB(NB)) dut (.*);

  function automatic logic [M-1:0] rand_m();
    logic [M-1:0] v;
    logic [M+31:0] w;
    for (int i = 0; i < int'(M); i += 32) w[i +: 32] = $urandom;
    v = w[M-1:0];
    return v;
  endfunction

  // Random carry-save split of v: words s (m bits) and c (m+1 bits, signed).
  task automatic split(input logic [M-1:0] v, output logic [M-1:0] s, output logic [M:0] c);
    s = rand_m();
    case ($urandom % 4)
      0: s = '0;
      1: s = v;
      default: ;
    endcase
    c = (M+1)'({1'b0, v} - {1'b0, s});
  endtask

  function automatic logic signed [M+1:0] value(logic [M-1:0] s, logic [M:0] c);
    return $signed({2'b00, s}) + $signed({c[M], c});
  endfunction

  task automatic check_result(string nm, logic [M-1:0] s, logic [M:0] c,
                              logic [M-1:0] a, logic [M-1:0] b);
    logic signed [M+1:0] v;
    logic [2*M-1:0] want, got;
    v    = value(s, c);
    want = ((2*M)'(a) * (2*M)'(b)) % (2*M)'(n_val);
    got  = (2*M)'(v) % (2*M)'(n_val);
    checks++;
    if (v < 0 || v >= 2 * $signed({2'b00, n_val}) || got != want) begin
      failures++;
      $display("  split a0 %h %h b %h %h", sv_a0s, sv_a0c, sv_bs, sv_bc);
      $display("FAIL %s: A=%h B=%h N=%h value=%h (mod N %h) want %h", nm, a, b, n_val, v, got, want);
    end
  endtask

  task automatic run(logic [M-1:0] a0, logic [M-1:0] a1, logic [M-1:0] b);
    int cyc;
    @(negedge clk);
    split(a0, a0_s, a0_c);
    split(a1, a1_s, a1_c);
    split(b, b_s, b_c);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    sv_a0s = a0_s; sv_a0c = a0_c; sv_bs = b_s; sv_bc = b_c;
    a0_s = rand_m(); a1_s = rand_m(); b_s = rand_m();   // operands only held at start
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != int'(LAT)) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, LAT);
    end
    check_result("R0", r0_s, r0_c, a0, b);
    check_result("R1", r1_s, r1_c, a1, b);
  endtask

  function automatic logic [M-1:0] below2n();
    return rand_m() % (2 * M'(n_val));
  endfunction

  initial begin
    int cyc;
    rst_n = 1'b0; n_load = 1'b0; start = 1'b0; n_val = '0;
    a0_s = '0; a0_c = '0; a1_s = '0; a1_c = '0; b_s = '0; b_c = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6; t++) begin
      @(negedge clk);
      n_val = NB'(rand_m()) | {1'b1, {(NB-1){1'b0}}};
      if (t == 1) n_val = {1'b1, {(NB-2){1'b0}}, 1'b1};
      if (t == 2) n_val = '1;
      n_load = 1'b1;
      @(negedge clk);
      n_load = 1'b0;
      cyc = 1;
      while (!ready) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != int'(QMAX) + 1) begin
        failures++;
        $display("FAIL modulus load took %0d cycles, expected %0d", cyc, QMAX + 1);
      end
      run('0, 2 * M'(n_val) - 1, 2 * M'(n_val) - 1);
      run(2 * M'(n_val) - 1, M'(n_val), 1);
      for (int r = 0; r < 30; r++) run(below2n(), below2n(), below2n());
      for (int r = 0; r < 10; r++) run(M'($urandom % 64), 2 * M'(n_val) - 1, below2n());
    end
    checks++;
    if (n_negfirst == 0) begin
      failures++;
      $display("FAIL no negative first multiplier digit occurred");
    end
    $display("negative first digits: %0d", n_negfirst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
