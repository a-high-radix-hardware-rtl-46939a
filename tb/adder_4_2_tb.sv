// adder_4_2_tb: checks the 4-2 adder.
//
// Random and corner-case words (0, all ones) with every injection count
// 0..2; checks s + c == x0 + x1 + x2 + x3 + inj modulo 2^W.
module adder_4_2_tb;
  localparam int unsigned W = 60;

  logic [W-1:0] x0, x1, x2, x3, s, c;
  logic [1:0]   inj;

  int checks = 0, failures = 0;

  adder_4_2 #(.W(W)) dut (.*);

  function automatic logic [W-1:0] pick(int r);
    case (r % 7)
      0: return '0;
      1: return '1;
      default: return W'({$urandom, $urandom});
    endcase
  endfunction

  initial begin
    for (int r = 0; r < 3000; r++) begin
      x0 = pick($urandom); x1 = pick($urandom); x2 = pick($urandom); x3 = pick($urandom);
      inj = 2'($urandom % 3);
      #1;
      checks++;
      if (W'(s + c) !== W'(x0 + x1 + x2 + x3 + W'(inj))) begin
        failures++;
        $display("FAIL %h %h %h %h inj=%0d -> %h", x0, x1, x2, x3, inj, W'(s + c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
