// tb_karatsuba_fir_top: end-to-end self-checking test of the Karatsuba FIR
// filter at its default size (16-bit samples and coefficients split into
// 8-bit halves, 8 taps), with no parameter overrides.
//
// The testbench programs the coefficients through the write port, streams
// samples with random pauses, reprograms taps while samples keep flowing, and
// drives full-scale values (-32768 on every tap and sample, the largest
// possible result). The reference is the plain convolution sum computed in
// the testbench with 64-bit integers; as the filter is in transposed form,
// the product h[k]*x(j) uses the coefficient in force when x(j) was accepted.
// Checked: every output value, and that out_valid follows in_valid by
// exactly two cycles. Counted, and required at least once each: pauses,
// coefficient writes during streaming, samples whose half sum xH+xL leaves
// the range of the high half, outputs whose Karatsuba xterm term
// sum(hH*xL + hL*xH) is negative and positive, and the full-scale output.
module tb_karatsuba_fir_top;
  import kfir_pkg::*;
  localparam int unsigned TAPS  = TAPS_DEF;
  localparam int unsigned DW    = DATA_W_DEF;
  localparam int unsigned CWD   = COEF_W_DEF;
  localparam int unsigned L     = SPLIT_DEF;
  localparam int unsigned OUT_W = acc_w(DW, CWD, TAPS);
  localparam int unsigned NCYC  = 20000;

  logic clk = 0, rst_n = 1;
  logic coef_we = 0;
  logic [$clog2(TAPS)-1:0] coef_addr = '0;
  logic signed [CWD-1:0] coef_wdata = '0;
  logic in_valid = 0;
  logic signed [DW-1:0] x_in = '0;
  logic out_valid;
  logic signed [OUT_W-1:0] y_out;

  int checks = 0, failures = 0;
  int n_pause = 0, n_rewrite = 0, n_midwide = 0, n_cross_neg = 0, n_cross_pos = 0, n_fullscale = 0;

  karatsuba_fir_top dut (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_wdata, .in_valid, .x_in, .out_valid, .y_out
  );

  always #5 clk = ~clk;

  // reference state
  int     cf   [TAPS];          // coefficients currently in the filter
  int     hist [TAPS];          // accepted samples, newest first
  int     hc   [TAPS][TAPS];    // coefficient set in force for each history sample
  bit     ev   [NCYC];
  longint eval [NCYC];

  function automatic int lo_half(int v);
    return v & ((1 << L) - 1);
  endfunction
  function automatic int hi_half(int v);
    return (v - lo_half(v)) / (1 << L);
  endfunction

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts
    foreach (cf[k]) cf[k] = 0;
    foreach (hist[k]) hist[k] = 0;
    foreach (hc[j, k]) hc[j][k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // program an initial set of random taps, filter idle
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      coef_we = 1; coef_addr = k[$clog2(TAPS)-1:0]; coef_wdata = 16'($urandom);
      @(posedge clk); #1;
      cf[k] = int'(coef_wdata);
      coef_we = 0;
    end

    for (int i = 0; i < NCYC; i++) begin
      bit full_scale;
      @(negedge clk);
      full_scale = (i >= NCYC - 3 * TAPS);
      // outputs of the sample driven two cycles ago
      if (i >= 2) begin
        checks++;
        if (out_valid !== ev[i - 2]) begin
          failures++; $display("FAIL out_valid at cycle %0d", i);
        end
        if (ev[i - 2]) begin
          checks++;
          if (longint'(y_out) != eval[i - 2]) begin
            failures++;
            if (failures < 20) $display("FAIL y=%0d exp=%0d cycle %0d", y_out, eval[i - 2], i);
          end
          if (eval[i - 2] == longint'(TAPS) * 64'sd1073741824) n_fullscale++;
        end
      end

      // stimulus for this cycle
      in_valid = full_scale ? 1'b1 : (($urandom % 5) != 0);
      x_in     = full_scale ? -16'sd32768 : 16'($urandom);
      if (!full_scale && ($urandom % 16) == 0 && i > 100) x_in = 16'sh7fff - 16'($urandom % 4);
      coef_we  = 0;
      if (full_scale && i < NCYC - 2 * TAPS) begin
        coef_we = 1; coef_addr = i[$clog2(TAPS)-1:0]; coef_wdata = -16'sd32768;
      end else if (!full_scale && ($urandom % 50) == 0) begin
        coef_we = 1; coef_addr = $clog2(TAPS)'($urandom); coef_wdata = 16'($urandom);
      end
      if (!in_valid) n_pause++;
      if (coef_we && in_valid) n_rewrite++;

      // reference: the sample at this edge uses the coefficients before the write
      ev[i] = in_valid;
      eval[i] = 0;
      if (in_valid) begin
        int xi;
        longint xterm;
        xi = int'(x_in);
        if (hi_half(xi) + lo_half(xi) > (1 << (DW - L - 1)) - 1) n_midwide++;
        for (int k = TAPS - 1; k > 0; k--) begin
          hist[k] = hist[k - 1];
          hc[k]   = hc[k - 1];
        end
        hist[0] = xi;
        hc[0]   = cf;
        xterm = 0;
        for (int k = 0; k < TAPS; k++) begin
          eval[i] += longint'(hc[k][k]) * longint'(hist[k]);
          xterm   += longint'(hi_half(hc[k][k]) * lo_half(hist[k]))
                   + longint'(lo_half(hc[k][k]) * hi_half(hist[k]));
        end
        if (xterm < 0) n_cross_neg++;
        if (xterm > 0) n_cross_pos++;
      end
      if (coef_we) cf[coef_addr] = int'(coef_wdata);
    end

    $display("mechanisms: pauses=%0d rewrites_while_streaming=%0d wide_half_sums=%0d cross_neg=%0d cross_pos=%0d full_scale=%0d",
             n_pause, n_rewrite, n_midwide, n_cross_neg, n_cross_pos, n_fullscale);
    checks += 6;
    if (n_pause == 0)     begin failures++; $display("FAIL no pause"); end
    if (n_rewrite == 0)   begin failures++; $display("FAIL no coefficient write while streaming"); end
    if (n_midwide == 0)   begin failures++; $display("FAIL no wide half sum"); end
    if (n_cross_neg == 0) begin failures++; $display("FAIL no negative xterm term"); end
    if (n_cross_pos == 0) begin failures++; $display("FAIL no positive xterm term"); end
    if (n_fullscale == 0) begin failures++; $display("FAIL full-scale output never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
