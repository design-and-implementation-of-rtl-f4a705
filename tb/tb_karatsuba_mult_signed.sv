// tb_karatsuba_mult_signed: self-checking test of the two's complement
// multiplier on the Karatsuba core, at 16 bits (one level) and 10 bits (two
// levels). Corner values including the most negative number, then random
// operands, each compared with a product computed in the testbench.
module tb_karatsuba_mult_signed;
  logic signed [15:0] a, b;
  logic signed [31:0] p;
  logic signed [9:0]  a10, b10;
  logic signed [19:0] p10;
  int checks = 0, failures = 0;

  karatsuba_mult_signed                         dut   (.a, .b, .p);
  karatsuba_mult_signed #(.W(10), .LEVELS(2))   dut10 (.a(a10), .b(b10), .p(p10));

  task automatic check_one();
    longint e, e10;
    #1;
    e   = longint'(a) * longint'(b);
    e10 = longint'(a10) * longint'(b10);
    checks += 2;
    if (longint'(p) != e)     begin failures++; $display("FAIL %0d*%0d=%0d", a, b, p); end
    if (longint'(p10) != e10) begin failures++; $display("FAIL10 %0d*%0d=%0d", a10, b10, p10); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [15:0] corner [7] = '{-16'sd32768, -16'sd32767, -16'sd1, 16'sd0, 16'sd1, 16'sd255, 16'sd32767};
    foreach (corner[i]) foreach (corner[j]) begin
      a = corner[i]; b = corner[j]; a10 = 10'(corner[i]); b10 = 10'(corner[j]);
      check_one();
    end
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom); b = 16'($urandom); a10 = 10'($urandom); b10 = 10'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
