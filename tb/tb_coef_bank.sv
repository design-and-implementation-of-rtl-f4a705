// tb_coef_bank: self-checking test of the coefficient store. Checks the reset
// value, single writes to every tap, that a write leaves the other taps
// alone, that writes with we low or to an address beyond TAPS are ignored,
// and that a written value is visible one cycle after the write edge.
module tb_coef_bank;
  localparam int unsigned TAPS = 6, COEF_W = 16;  // 6 taps: address 6,7 are out of range
  logic clk = 0, rst_n = 1, we = 0;
  logic [2:0] waddr = '0;
  logic signed [COEF_W-1:0] wdata = '0;
  logic [TAPS-1:0][COEF_W-1:0] coef;
  logic [COEF_W-1:0] model [TAPS];
  int checks = 0, failures = 0;

  coef_bank #(.TAPS(TAPS), .COEF_W(COEF_W)) dut (.clk, .rst_n, .we, .waddr, .wdata, .coef);

  always #5 clk = ~clk;

  task automatic compare(string what);
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (coef[k] !== model[k]) begin
        failures++;
        $display("FAIL %s tap %0d got %h exp %h", what, k, coef[k], model[k]);
      end
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts
    foreach (model[k]) model[k] = '0;
    repeat (2) @(posedge clk);
    #1 compare("reset");
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = 3'($urandom);
      wdata = 16'($urandom);
      @(posedge clk);
      #1;
      if (we && waddr < TAPS) model[waddr] = wdata;
      compare("write");
    end
    // reset in the middle clears everything again
    @(negedge clk) rst_n = 0; we = 0;
    #1;
    foreach (model[k]) model[k] = '0;
    compare("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
