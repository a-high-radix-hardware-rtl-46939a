// quotient_estimator_tb: checks the quotient digit estimate.
//
// For several moduli N (random with top bit set, smallest, largest) it
// checks that ready returns QMAX+1 cycles after the load pulse, then
// applies accumulator values S in carry-save form (random W-bit split) and
// checks the estimate against its defining bounds:
//   for 0 <= S < (QMAX+1)*2^R*N:  0 <= S - q*2^R*N < 2^R*N + 3*2^n
//   for -2N <= S < 0:             q == 0
// with all arithmetic done in the bench on wide integers.
module quotient_estimator_tb;
  import mexp_pkg::*;

  localparam int unsigned NB = 32;
  localparam int unsigned W  = acc_width(NB);

  logic                clk = 1'b0;
  logic                rst_n, load, ready;
  logic [NB-1:0]       n_val;
  logic [EST_BITS-1:0] s_top, c_top;
  logic [QBITS-1:0]    q;

  int checks = 0, failures = 0;
  int qmax_seen = 0;

  always #5 clk = ~clk;

  quotient_estimator #(.NB(NB)) dut (.*);

  function automatic logic signed [63:0] rnd64();
    return $signed({$urandom, $urandom} & 64'h7fff_ffff_ffff_ffff);
  endfunction

  task automatic apply(logic signed [63:0] sv);
    logic [W-1:0] ws, wc;
    logic signed [63:0] rem, nn;
    ws = W'(rnd64());
    wc = W'(sv) - ws;
    s_top = ws[W-1 -: EST_BITS];
    c_top = wc[W-1 -: EST_BITS];
    #1;
    nn  = $signed({32'd0, n_val});
    rem = sv - $signed({58'd0, q}) * (nn <<< R);
    checks++;
    if (sv < 0) begin
      if (q != 0) begin
        failures++;
        $display("FAIL negative S=%0d gave q=%0d", sv, q);
      end
    end else if (rem < 0 || rem >= (nn <<< R) + 3 * (64'sd1 <<< NB) || q > QMAX) begin
      failures++;
      $display("FAIL S=%0d N=%0d q=%0d rem=%0d", sv, nn, q, rem);
    end
    if (int'(q) > qmax_seen) qmax_seen = int'(q);
  endtask

  initial begin
    int cyc;
    logic signed [63:0] nn, lim;
    rst_n = 1'b0; load = 1'b0; n_val = '0; s_top = '0; c_top = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 8; t++) begin
      @(negedge clk);
      n_val = NB'($urandom) | {1'b1, {(NB-1){1'b0}}};
      if (t == 0) n_val = {1'b1, {(NB-2){1'b0}}, 1'b1};
      if (t == 1) n_val = '1;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      cyc = 1;
      while (!ready) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != int'(QMAX) + 1) begin
        failures++;
        $display("FAIL load took %0d cycles", cyc);
      end
      nn  = $signed({32'd0, n_val});
      lim = (QMAX + 1) * (nn <<< R);
      apply(0);
      apply(lim - 1);
      apply(-1);
      apply(-2 * nn);
      for (int j = 1; j <= int'(QMAX); j++) apply(j * (nn <<< R));
      for (int r = 0; r < 500; r++) apply(rnd64() % lim);
      for (int r = 0; r < 50; r++) apply(-(rnd64() % (2 * nn)) - 1);
    end
    checks++;
    if (qmax_seen != int'(QMAX)) begin
      failures++;
      $display("FAIL largest q seen %0d", qmax_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
