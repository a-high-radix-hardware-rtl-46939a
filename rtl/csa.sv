// csa: W-bit carry-save adder (3:2 compressor).
//
// Adds three W-bit words into a sum word and a carry word with no carry
// propagation: s = x ^ y ^ z, c = majority(x, y, z) shifted one place left.
// Bit 0 of the carry word is free and is filled with cin, so that a single
// +1 can be injected at no cost. Results are modulo 2^W: x + y + z + cin ==
// s + c (mod 2^W). Purely combinational.
module csa #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] maj;

  always_comb begin
    s   = x ^ y ^ z;
    maj = (x & y) | (x & z) | (y & z);
    c   = {maj[W-2:0], cin};
  end
endmodule
