// karatsuba_mult_signed: two's complement W x W multiplier on the unsigned
// Karatsuba core.
//
// The operands are turned into magnitudes (a W-bit magnitude holds even the
// most negative value), multiplied by karatsuba_mult, and the product is
// negated when exactly one operand is negative. The design description gives
// the Karatsuba formula for unsigned halves only; this sign-magnitude wrapper
// is this implementation's way of using it on signed filter data.
// Purely combinational.
module karatsuba_mult_signed #(
  parameter int unsigned W      = 16,
  parameter int unsigned LEVELS = 1
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);

  logic [W-1:0]   mag_a, mag_b;
  logic [2*W-1:0] mag_p;
  logic           neg;

  always_comb begin
    mag_a = a[W-1] ? W'(-a) : W'(a);
    mag_b = b[W-1] ? W'(-b) : W'(b);
    neg   = a[W-1] ^ b[W-1];
  end

  karatsuba_mult #(.W(W), .LEVELS(LEVELS)) u_core (.a(mag_a), .b(mag_b), .p(mag_p));

  always_comb p = neg ? -signed'(mag_p) : signed'(mag_p);

endmodule
