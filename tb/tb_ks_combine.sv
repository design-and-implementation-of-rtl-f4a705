// tb_ks_combine: self-checking test of the Karatsuba output conversion.
// Random signed 16-bit pairs x, h are split in the testbench into 8-bit
// halves; the three partial products A = xH*hH, C = xL*hL and
// M = (xH+xL)*(hH+hL) are fed to the block, whose output must equal the
// plain product x*h. Also checks a sum of eight such products (filter-sized
// inputs) against the sum of the plain products.
module tb_ks_combine;
  localparam int unsigned AW = 19, CW = 21, MW = 23, OW = 35;
  logic signed [AW-1:0] a;
  logic signed [CW-1:0] c;
  logic signed [MW-1:0] m;
  logic signed [OW-1:0] y;
  int checks = 0, failures = 0;

  ks_combine #(.AW(AW), .CW(CW), .MW(MW), .L(8), .OW(OW)) dut (.a, .c, .m, .y);

  function automatic int lo8(int v);
    return ((v % 256) + 256) % 256;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint sa, sc, sm, sy;
      int n;
      n = (i % 2 == 0) ? 1 : 8;
      sa = 0; sc = 0; sm = 0; sy = 0;
      for (int k = 0; k < n; k++) begin
        int x, h, xl, hl, xh, hh;
        x = int'($signed(16'($urandom)));
        h = int'($signed(16'($urandom)));
        if (i < 4) begin x = -32768; h = (i < 2) ? -32768 : 32767; end
        xl = lo8(x); hl = lo8(h);
        xh = (x - xl) / 256; hh = (h - hl) / 256;
        sa += longint'(xh * hh);
        sc += longint'(xl * hl);
        sm += longint'((xh + xl) * (hh + hl));
        sy += longint'(x) * longint'(h);
      end
      a = AW'(sa); c = CW'(sc); m = MW'(sm);
      #1;
      checks++;
      if (longint'(y) != sy) begin
        failures++;
        $display("FAIL a=%0d c=%0d m=%0d y=%0d exp=%0d", a, c, m, y, sy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
