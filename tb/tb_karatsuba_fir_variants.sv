// tb_karatsuba_fir_variants: runs the Karatsuba FIR filter at sizes other
// than its default, to exercise the generic parts of the RTL:
//   - 12-bit samples, 10-bit coefficients, split at bit 5, 5 taps, and two
//     levels of Karatsuba recursion in every tap multiplier (uneven halves,
//     unequal sample and coefficient widths)
//   - 16-bit operands split at 8, a single tap, plain tap multipliers
//   - 16-bit operands split at 8, 4 taps, three recursion levels
// Each run is checked against a convolution reference (fir_variant_check).
module tb_karatsuba_fir_variants;
  logic clk = 1'b0;
  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  int checks, failures;

  always #5 clk = ~clk;

  fir_variant_check #(.DATA_W(12), .COEF_W(10), .SPLIT(5), .TAPS(5), .LEVELS(2)) u_v0 (.clk, .checks(c0), .failures(f0), .done(d0));
  fir_variant_check #(.DATA_W(16), .COEF_W(16), .SPLIT(8), .TAPS(1), .LEVELS(0)) u_v1 (.clk, .checks(c1), .failures(f1), .done(d1));
  fir_variant_check #(.DATA_W(16), .COEF_W(16), .SPLIT(8), .TAPS(4), .LEVELS(3)) u_v2 (.clk, .checks(c2), .failures(f2), .done(d2));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
