// transposed_fir: N-tap FIR filter in transposed direct form, one of the three
// sub-filters of the Karatsuba FIR filter.
//
// Every accepted sample x(n) is multiplied by all TAPS coefficients at once
// (one karatsuba_mult_signed per tap). The products are added into a chain of
// partial-sum registers that runs from the last tap to the first:
//   r[TAPS-1] <= h[TAPS-1]*x(n)
//   r[k]      <= h[k]*x(n) + r[k+1]
// so the critical path is one multiplier and one adder whatever TAPS is, and
// y = r[0] = sum_k h[k]*x(n-k).
//
// Timing: x is taken at a rising edge with in_valid high; the matching y
// appears after that edge together with out_valid (latency 1). With in_valid
// low the registers hold (a clock enable). Reset is asynchronous, active low,
// and clears the partial sums. The accumulators are ACC_W bits, enough for
// TAPS full-precision products, so no overflow can occur.
//
// The transposed form with Karatsuba multipliers follows the design; the
// clock-enable handshake, reset and widths are this implementation's choices.
module transposed_fir
  import kfir_pkg::*;
#(
  parameter int unsigned XW     = 9,
  parameter int unsigned CW     = 9,
  parameter int unsigned TAPS   = 8,
  parameter int unsigned LEVELS = 1,
  localparam int unsigned ACC_W = acc_w(XW, CW, TAPS),
  localparam int unsigned MW    = kmax(XW, CW)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [XW-1:0]        x,
  input  logic [TAPS-1:0][CW-1:0]     coef,
  output logic                        out_valid,
  output logic signed [ACC_W-1:0]     y
);

  logic signed [2*MW-1:0]  prod [TAPS];
  logic signed [ACC_W-1:0] r    [TAPS];

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    logic signed [MW-1:0] xa, ca;
    always_comb begin
      xa = MW'(x);
      ca = MW'(signed'(coef[k]));
    end
    karatsuba_mult_signed #(.W(MW), .LEVELS(LEVELS)) u_mul (.a(xa), .b(ca), .p(prod[k]));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r[k] <= '0;
      end else if (in_valid) begin
        if (k == TAPS - 1) r[k] <= ACC_W'(prod[k]);
        else               r[k] <= ACC_W'(prod[k]) + r[(k + 1) % TAPS];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  assign y = r[0];

endmodule
