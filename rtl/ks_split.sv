// ks_split: Karatsuba operand conversion. A W-bit two's complement value V is
// cut at bit L into
//   hi  = V >>> L              (signed, W-L bits)
//   lo  = V[L-1:0]             (unsigned, carried as a signed L+1-bit value)
//   mid = hi + lo              (signed, one bit wider than the wider of the two)
// so that V == hi*2^L + lo exactly. hi, lo and mid are the operands of the
// high, low and middle sub-filters of the Karatsuba FIR filter; the same unit
// converts the input samples and the coefficients.
//
// The split into two halves and the half sum (XH+XL) follow the Karatsuba
// formula of the design; keeping the high half signed and the low half
// unsigned, so that signed samples split exactly, is this implementation's
// choice. Purely combinational. Most of the unit is wiring: hi and the low
// bits of lo are input bits and the top bit of lo is constant zero; only mid
// needs an adder.
module ks_split
  import kfir_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter int unsigned L = 8,
  localparam int unsigned HW = hi_w(W, L),
  localparam int unsigned LW = lo_w(L),
  localparam int unsigned MW = mid_w(W, L)
) (
  input  logic signed [W-1:0]  v,
  output logic signed [HW-1:0] hi,
  output logic signed [LW-1:0] lo,
  output logic signed [MW-1:0] mid
);

  always_comb begin
    hi  = v[W-1:L];
    lo  = {1'b0, v[L-1:0]};
    mid = MW'(hi) + MW'(lo);
  end

endmodule
