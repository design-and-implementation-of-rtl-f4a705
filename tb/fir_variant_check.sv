// fir_variant_check: testbench helper that runs one parameter set of the
// Karatsuba FIR filter against a plain convolution reference.
//
// It instantiates karatsuba_fir_top with the given sizes, programs random
// coefficients, streams NCYC cycles of random samples with random pauses and
// occasional coefficient writes, and compares every output (two cycles after
// its sample) with the sum of h[k]*x(n-k) computed here with 64-bit integers,
// using for each product the coefficient in force when the sample arrived.
// It ends with the most negative value on every tap and sample. Results are
// reported through checks/failures; done rises when the run is over.
module fir_variant_check #(
  parameter int unsigned DATA_W = 12,
  parameter int unsigned COEF_W = 10,
  parameter int unsigned SPLIT  = 5,
  parameter int unsigned TAPS   = 5,
  parameter int unsigned LEVELS = 2,
  parameter int unsigned NCYC   = 4000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned OUT_W = DATA_W + COEF_W + ((TAPS > 1) ? $clog2(TAPS) : 0);
  localparam int unsigned AW    = (TAPS > 1) ? $clog2(TAPS) : 1;

  logic rst_n = 1'b1, coef_we = 1'b0, in_valid = 1'b0, out_valid;
  logic [AW-1:0] coef_addr = '0;
  logic signed [COEF_W-1:0] coef_wdata = '0;
  logic signed [DATA_W-1:0] x_in = '0;
  logic signed [OUT_W-1:0] y_out;

  karatsuba_fir_top #(.DATA_W(DATA_W), .COEF_W(COEF_W), .SPLIT(SPLIT), .TAPS(TAPS), .LEVELS(LEVELS)) dut (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_wdata, .in_valid, .x_in, .out_valid, .y_out
  );

  longint cf   [TAPS];
  longint hist [TAPS];
  longint hc   [TAPS][TAPS];
  bit     ev   [NCYC];
  longint eval [NCYC];

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    foreach (cf[k]) cf[k] = 0;
    foreach (hist[k]) hist[k] = 0;
    foreach (hc[j, k]) hc[j][k] = 0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = AW'(k); coef_wdata = COEF_W'($urandom);
      @(posedge clk); #1;
      cf[k] = longint'(coef_wdata);
      coef_we = 1'b0;
    end
    for (int i = 0; i < NCYC; i++) begin
      bit full;
      @(negedge clk);
      full = (i >= NCYC - 3 * TAPS - 4);
      if (i >= 2) begin
        checks++;
        if (out_valid !== ev[i - 2]) begin failures++; $display("FAIL %m out_valid cycle %0d", i); end
        if (ev[i - 2]) begin
          checks++;
          if (longint'(y_out) != eval[i - 2]) begin
            failures++;
            if (failures < 10) $display("FAIL %m y=%0d exp=%0d cycle %0d", y_out, eval[i - 2], i);
          end
        end
      end
      in_valid = full ? 1'b1 : (($urandom % 4) != 0);
      x_in     = full ? {1'b1, {(DATA_W-1){1'b0}}} : DATA_W'($urandom);
      coef_we  = 1'b0;
      if (full && i < NCYC - 2 * TAPS - 4) begin
        coef_we = 1'b1; coef_addr = AW'(i % TAPS); coef_wdata = {1'b1, {(COEF_W-1){1'b0}}};
      end else if (!full && ($urandom % 40) == 0) begin
        coef_we = 1'b1; coef_addr = AW'($urandom % TAPS); coef_wdata = COEF_W'($urandom);
      end
      ev[i] = in_valid;
      eval[i] = 0;
      if (in_valid) begin
        for (int k = TAPS - 1; k > 0; k--) begin
          hist[k] = hist[k - 1];
          hc[k]   = hc[k - 1];
        end
        hist[0] = longint'(x_in);
        hc[0]   = cf;
        for (int k = 0; k < TAPS; k++) eval[i] += hc[k][k] * hist[k];
      end
      if (coef_we) cf[coef_addr] = longint'(coef_wdata);
    end
    done = 1'b1;
  end
endmodule
