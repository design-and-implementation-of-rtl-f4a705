// tb_ks_split: exhaustive self-checking test of the Karatsuba operand split
// for 16-bit values cut at bit 8. For every value it checks that
// hi*256 + lo reproduces the value, that lo is the unsigned low byte, and that
// mid equals hi + lo.
module tb_ks_split;
  logic signed [15:0] v;
  logic signed [7:0]  hi;
  logic signed [8:0]  lo;
  logic signed [9:0]  mid;
  int checks = 0, failures = 0;

  ks_split #(.W(16), .L(8)) dut (.v, .hi, .lo, .mid);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -32768; i < 32768; i++) begin
      int vi, eh, el;
      vi = i;
      v  = 16'(vi);
      #1;
      el = ((vi % 256) + 256) % 256;
      eh = (vi - el) / 256;
      checks++;
      if (int'(hi) != eh || int'(lo) != el || int'(mid) != eh + el) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d hi=%0d lo=%0d mid=%0d", vi, hi, lo, mid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
