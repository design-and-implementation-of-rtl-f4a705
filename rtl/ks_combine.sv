// ks_combine: Karatsuba output conversion. From the high-half result A, the
// low-half result C and the half-sum result M it forms
//   Y = A*2^(2L) + (M - A - C)*2^L + C
// where M - A - C is the b_cross term B' of the Karatsuba formula. The two
// scalings are fixed wiring (hardwired shifts); the arithmetic is three
// adders/subtractors. All terms are sign-extended to OW bits and the sum is
// taken modulo 2^OW, which is exact whenever the true Y fits in OW bits
// (the caller sizes OW for that).
//
// The formula follows the design description; widths and the order of the
// additions are this implementation's own. Purely combinational.
module ks_combine #(
  parameter int unsigned AW = 19,
  parameter int unsigned CW = 21,
  parameter int unsigned MW = 23,
  parameter int unsigned L  = 8,
  parameter int unsigned OW = 35
) (
  input  logic signed [AW-1:0] a,
  input  logic signed [CW-1:0] c,
  input  logic signed [MW-1:0] m,
  output logic signed [OW-1:0] y
);

  logic signed [OW-1:0] ax, cx, mx, b_cross;

  always_comb begin
    ax    = OW'(a);
    cx    = OW'(c);
    mx    = OW'(m);
    b_cross = mx - ax - cx;
    y     = (ax <<< (2 * L)) + (b_cross <<< L) + cx;
  end

endmodule
