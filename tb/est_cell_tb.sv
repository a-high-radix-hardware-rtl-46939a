// est_cell_tb: checks one quotient estimation cell.
//
// Loads random constants into the cell register and applies random top
// fields of Ss and Sc; checks that neg equals the sign bit of the EB-bit
// sum s_top + c_top + constant, and that the register keeps its value
// while ld is low.
module est_cell_tb;
  import mexp_pkg::*;

  localparam int unsigned EB = EST_BITS;

  logic          clk = 1'b0;
  logic          ld;
  logic [EB-1:0] ld_val, s_top, c_top;
  logic          neg;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  est_cell #(.EB(EB)) dut (.*);

  initial begin
    logic [EB-1:0] k, sum;
    ld = 1'b0; ld_val = '0; s_top = '0; c_top = '0;
    for (int r = 0; r < 50; r++) begin
      @(negedge clk);
      k = EB'($urandom);
      ld = 1'b1; ld_val = k;
      @(negedge clk);
      ld = 1'b0; ld_val = EB'($urandom);   // must not be taken
      for (int j = 0; j < 40; j++) begin
        s_top = EB'($urandom);
        c_top = EB'($urandom);
        @(negedge clk);
        sum = s_top + c_top + k;
        checks++;
        if (neg !== sum[EB-1]) begin
          failures++;
          $display("FAIL k=%h s=%h c=%h neg=%0d", k, s_top, c_top, neg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
