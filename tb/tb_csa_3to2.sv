// tb_csa_3to2: self-checking test of the carry-save row. Random and corner
// operands; checks that sum is the bitwise XOR and that sum + carry equals
// a + b + c + cin modulo 2^W. Combinational block: no clock needed beyond
// a small delay between vectors.
module tb_csa_3to2;
  localparam int unsigned W = 32;
  logic [W-1:0] a, b, c, sum, carry;
  logic         cin;
  int checks = 0, failures = 0;

  csa_3to2 #(.W(W)) dut (.a, .b, .c, .cin, .sum, .carry);

  task automatic check_one();
    logic [W-1:0] exp_total;
    #1;
    exp_total = W'(64'(a) + 64'(b) + 64'(c) + 64'(cin));
    checks++;
    if (sum !== (a ^ b ^ c)) begin
      failures++;
      $display("FAIL sum a=%h b=%h c=%h sum=%h", a, b, c, sum);
    end
    checks++;
    if (W'(sum + carry) !== exp_total) begin
      failures++;
      $display("FAIL total a=%h b=%h c=%h cin=%b got=%h exp=%h", a, b, c, cin, W'(sum + carry), exp_total);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '1; c = '1; cin = 1'b1; check_one();
    a = '0; b = '0; c = '0; cin = 1'b0; check_one();
    a = '1; b = 1;  c = 0;  cin = 1'b0; check_one();
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = $urandom; c = $urandom; cin = 1'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
