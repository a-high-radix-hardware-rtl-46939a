// modexp_full_tb: one full-size exponentiation, n = 512, with the top at
// its default parameters.
//
// Runs three exponentiations: a random 512-bit odd modulus with its top
// bit set, random M < N and random 512-bit exponent; then M = N-1 with an
// all-ones exponent and the largest modulus 2^512 - 1; then a random M with
// the smallest odd modulus 2^511 + 1. Each result is compared with
// square-and-multiply on 1024-bit integers in the bench, and each cycle
// count with (QMAX+3) + n*(6*(ND+2)+5) + (n+2) = 325,679.
module modexp_full_tb;
  import mexp_pkg::*;

  localparam int unsigned NB = 512;
  localparam int unsigned ND = num_digits(NB);
  localparam int unsigned EXP_CYC = (QMAX + 3) + NB * (6 * (ND + 2) + 5) + (NB + 2);

  logic          clk = 1'b0;
  logic          rst_n;
  logic          start;
  logic [NB-1:0] m_in, e_in, n_in;
  logic          busy, done;
  logic [NB-1:0] result;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  modexp_top dut (.*);

  function automatic logic [NB-1:0] ref_exp(logic [NB-1:0] mm, logic [NB-1:0] ee,
                                           logic [NB-1:0] nn);
    logic [2*NB-1:0] x, y, n2;
    n2 = {{NB{1'b0}}, nn};
    x  = 1;
    y  = {{NB{1'b0}}, mm};
    for (int i = 0; i < int'(NB); i++) begin
      if (ee[i]) x = (x * y) % n2;
      y = (y * y) % n2;
    end
    return x[NB-1:0];
  endfunction

  task automatic run(logic [NB-1:0] mm, logic [NB-1:0] ee, logic [NB-1:0] nn);
    logic [NB-1:0] want;
    int cyc;
    want = ref_exp(mm, ee, nn);
    @(negedge clk);
    m_in = mm; e_in = ee; n_in = nn;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (result !== want) begin
      failures++;
      $display("FAIL result %h\n expected %h", result, want);
    end
    checks++;
    if (cyc != int'(EXP_CYC)) begin
      failures++;
      $display("FAIL cycle count %0d, expected %0d", cyc, EXP_CYC);
    end
    $display("exponentiation done in %0d cycles", cyc);
  endtask

  initial begin
    logic [NB-1:0] mm, ee, nn;
    rst_n = 1'b0; start = 1'b0; m_in = '0; e_in = '0; n_in = '0;
    for (int i = 0; i < int'(NB); i += 32) begin
      nn[i +: 32] = $urandom;
      mm[i +: 32] = $urandom;
      ee[i +: 32] = $urandom;
    end
    nn[NB-1] = 1'b1;
    nn[0]    = 1'b1;
    mm       = mm % nn;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(mm, ee, nn);
    run('1 - 1, '1, '1);
    nn = {1'b1, {(NB-2){1'b0}}, 1'b1};
    run(ee % nn, mm, nn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * (EXP_CYC + 100)) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
