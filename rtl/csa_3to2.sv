// csa_3to2: one row of full adders used as a carry-save adder (3:2 compressor).
//
// Three W-bit operands are reduced to a sum vector and a carry vector with no
// carry propagation: sum = a ^ b ^ c bit by bit, and the carry vector holds
// majority(a, b, c) moved one place left, so that
//   a + b + c + cin == sum + carry   (modulo 2^W).
// The free least significant carry bit takes cin, which lets the caller add a
// constant 1 (for instance the +1 of a two's complement negation) at no cost.
// The majority of the top bit would land beyond bit W-1 and is dropped, which
// makes the row exact modulo 2^W. The design names carry-save addition as the
// adder used with the Karatsuba multiplier; the full-adder row is the
// standard form. Purely combinational.
module csa_3to2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  always_comb begin
    sum   = a ^ b ^ c;
    carry = {(a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]), cin};
  end

endmodule
