// tb_transposed_fir: self-checking test of the transposed-form sub-filter at
// its default size (9-bit signed samples and coefficients, 8 taps). Random
// coefficients and samples, with in_valid dropped at random to pause the
// filter; a reference keeps the accepted sample history and forms the
// convolution sum. Checks each output value and that out_valid follows
// in_valid by exactly one cycle. Coefficients are changed part way through:
// in the transposed form the product h[k]*x(j) is formed when x(j) arrives,
// so the reference uses the coefficients in force at that time.
module tb_transposed_fir;
  localparam int unsigned XW = 9, CW = 9, TAPS = 8;
  localparam int unsigned ACC_W = XW + CW + 3;
  logic clk = 0, rst_n = 1, in_valid = 0, out_valid;
  logic signed [XW-1:0] x = '0;
  logic [TAPS-1:0][CW-1:0] coef;
  logic signed [ACC_W-1:0] y;
  int checks = 0, failures = 0;
  int hist [TAPS];
  int hc   [TAPS][TAPS];  // coefficient set in force when each history sample was taken
  int cf   [TAPS];
  longint expected;
  logic exp_valid;
  int stalls = 0;

  transposed_fir dut (.clk, .rst_n, .in_valid, .x, .coef, .out_valid, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_coefs(bit extreme);
    for (int k = 0; k < TAPS; k++) begin
      cf[k] = extreme ? -256 : int'($signed(9'($urandom)));
      coef[k] = 9'(cf[k]);
    end
  endtask

  initial begin
    #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts
    foreach (hist[k]) hist[k] = 0;
    foreach (hc[j, k]) hc[j][k] = 0;
    new_coefs(0);
    exp_valid = 0;
    expected = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // check the output produced by the previous edge
      checks++;
      if (out_valid !== exp_valid) begin
        failures++; $display("FAIL valid at %0d", i);
      end
      if (exp_valid) begin
        checks++;
        if (longint'(y) != expected) begin
          failures++; $display("FAIL y=%0d exp=%0d at %0d", y, expected, i);
        end
      end
      // new stimulus; taps change only while the filter is paused
      if (i == 1500) new_coefs(0);
      if (i == 2500) new_coefs(1);
      in_valid = ($urandom % 4) != 0;
      if (i == 1500 || i == 2500) in_valid = 0;
      x = (i > 2500) ? -9'sd256 : 9'($urandom);
      if (!in_valid) stalls++;
      exp_valid = in_valid;
      if (in_valid) begin
        for (int k = TAPS - 1; k > 0; k--) begin
          hist[k] = hist[k - 1];
          hc[k]   = hc[k - 1];
        end
        hist[0] = int'(x);
        hc[0]   = cf;
        expected = 0;
        for (int k = 0; k < TAPS; k++) expected += longint'(hc[k][k]) * longint'(hist[k]);
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no pause cycles exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
