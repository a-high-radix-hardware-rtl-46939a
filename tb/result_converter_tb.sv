// result_converter_tb: checks the serial final reduction.
//
// Applies values X in [0, 2N) in random carry-save splits (including
// splits with the negative top bit), and checks result == X mod N, the
// subtracted flag, and that done comes m+1 cycles after start.
module result_converter_tb;
  localparam int unsigned NB = 40;
  localparam int unsigned M  = NB + 1;

  logic          clk = 1'b0;
  logic          rst_n, start, busy, done, subtracted;
  logic [M-1:0]  x_s;
  logic [M:0]    x_c;
  logic [NB-1:0] n_val, result;

  int checks = 0, failures = 0;
  int n_sub = 0, n_nosub = 0;

  always #5 clk = ~clk;

  result_converter #(.NB(NB)) dut (.*);

  task automatic run(logic [M-1:0] xv);
    int cyc;
    logic [M-1:0] want;
    @(negedge clk);
    x_s = M'({$urandom, $urandom});
    if ($urandom % 3 == 0) x_s = '0;
    x_c = (M+1)'({1'b0, xv} - {1'b0, x_s});
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    x_s = '0; x_c = '0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    want = xv % M'(n_val);
    checks++;
    if (result !== NB'(want) || subtracted !== (xv >= M'(n_val)) || cyc != int'(M) + 1) begin
      failures++;
      $display("FAIL X=%h N=%h got %h (sub %0d) want %h, %0d cycles", xv, n_val, result,
               subtracted, want, cyc);
    end
    if (subtracted) n_sub++; else n_nosub++;
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; x_s = '0; x_c = '0; n_val = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 10; t++) begin
      n_val = NB'({$urandom, $urandom}) | {1'b1, {(NB-1){1'b0}}};
      run('0);
      run(M'(n_val) - 1);
      run(M'(n_val));
      run(2 * M'(n_val) - 1);
      for (int r = 0; r < 40; r++) run(M'({$urandom, $urandom}) % (2 * M'(n_val)));
    end
    checks++;
    if (n_sub == 0 || n_nosub == 0) begin
      failures++;
      $display("FAIL subtraction taken %0d, not taken %0d", n_sub, n_nosub);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
