// tb_karatsuba_mult: self-checking test of the recursive unsigned Karatsuba
// multiplier. Three instances: the default 16-bit single-level split, a
// 16-bit three-level recursion and a 13-bit (odd width) two-level recursion.
// Corner and random operands; each product is compared with a 64-bit
// reference product computed in the testbench.
module tb_karatsuba_mult;
  logic [15:0] a16, b16;
  logic [31:0] p1, p3;
  logic [12:0] a13, b13;
  logic [25:0] p13;
  int checks = 0, failures = 0;

  karatsuba_mult                           dut1  (.a(a16), .b(b16), .p(p1));
  karatsuba_mult #(.W(16), .LEVELS(3))     dut3  (.a(a16), .b(b16), .p(p3));
  karatsuba_mult #(.W(13), .LEVELS(2))     dut13 (.a(a13), .b(b13), .p(p13));

  task automatic check_one();
    longint unsigned e16, e13;
    #1;
    e16 = longint'(a16) * longint'(b16);
    e13 = longint'(a13) * longint'(b13);
    checks += 3;
    if (64'(p1) != e16) begin failures++; $display("FAIL L1 %0d*%0d=%0d", a16, b16, p1); end
    if (64'(p3) != e16) begin failures++; $display("FAIL L3 %0d*%0d=%0d", a16, b16, p3); end
    if (64'(p13) != e13) begin failures++; $display("FAIL W13 %0d*%0d=%0d", a13, b13, p13); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'h00ff, 16'h0100, 16'hff00, 16'hffff};
    foreach (corner[i]) foreach (corner[j]) begin
      a16 = corner[i]; b16 = corner[j]; a13 = 13'(corner[i]); b13 = 13'(corner[j]);
      check_one();
    end
    for (int i = 0; i < 20000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); a13 = 13'($urandom); b13 = 13'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
