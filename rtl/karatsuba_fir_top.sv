// karatsuba_fir_top: programmable N-tap FIR filter built with the Karatsuba
// formula at filter level.
//
// Every sample x and every coefficient h is split at bit SPLIT into a high
// half and a low half, x = xH*2^L + xL, h = hH*2^L + hL. The filter output
//   y(n) = sum_k h[k] x(n-k)
// then equals A*2^(2L) + (M - A - C)*2^L + C with three sub-filters of
// reduced dynamic range running on the same sample stream:
//   A: coefficients hH on samples xH       (high sub-filter)
//   C: coefficients hL on samples xL       (low sub-filter)
//   M: coefficients hH+hL on samples xH+xL (middle sub-filter)
// The input conversion (ks_split) forms the halves and the half sum of the
// sample; the same conversion is applied to each stored coefficient. The
// output conversion (ks_combine) applies the two fixed shifts and the
// additions. Each sub-filter is a transposed-form FIR whose tap multipliers
// are themselves Karatsuba multipliers (recursion depth LEVELS).
//
// Interface:
//   coef_we/coef_addr/coef_wdata  write one coefficient (seen by samples
//                                 accepted from the next cycle on)
//   in_valid/x_in                 one sample per cycle while in_valid is high
//   out_valid/y_out               full-precision result, OUT_W bits
// Timing: y_out for a sample accepted at clock edge t is registered at edge
// t+1 (out_valid high after it); the filter accepts a sample every cycle.
// Reset is asynchronous and active low and clears coefficients and state.
//
// The three-sub-filter structure, the input/output conversions and the
// 16-bit operands split into 8-bit halves follow the design description.
// The tap count, the coefficient write port, signed arithmetic, the
// in_valid/out_valid handshake and the output register are this
// implementation's choices.
module karatsuba_fir_top
  import kfir_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned COEF_W = COEF_W_DEF,
  parameter int unsigned SPLIT  = SPLIT_DEF,
  parameter int unsigned TAPS   = TAPS_DEF,
  parameter int unsigned LEVELS = LEVELS_DEF,
  localparam int unsigned OUT_W = acc_w(DATA_W, COEF_W, TAPS),
  localparam int unsigned AW    = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      coef_we,
  input  logic [AW-1:0]             coef_addr,
  input  logic signed [COEF_W-1:0]  coef_wdata,
  input  logic                      in_valid,
  input  logic signed [DATA_W-1:0]  x_in,
  output logic                      out_valid,
  output logic signed [OUT_W-1:0]   y_out
);

  // operand widths of the three sub-filters
  localparam int unsigned XHW = hi_w(DATA_W, SPLIT);
  localparam int unsigned XLW = lo_w(SPLIT);
  localparam int unsigned XMW = mid_w(DATA_W, SPLIT);
  localparam int unsigned CHW = hi_w(COEF_W, SPLIT);
  localparam int unsigned CLW = lo_w(SPLIT);
  localparam int unsigned CMW = mid_w(COEF_W, SPLIT);
  localparam int unsigned AAW = acc_w(XHW, CHW, TAPS);
  localparam int unsigned ACW = acc_w(XLW, CLW, TAPS);
  localparam int unsigned AMW = acc_w(XMW, CMW, TAPS);

  // ---- coefficients and their conversion ----
  logic [TAPS-1:0][COEF_W-1:0] coef;
  logic [TAPS-1:0][CHW-1:0]    coef_h;
  logic [TAPS-1:0][CLW-1:0]    coef_l;
  logic [TAPS-1:0][CMW-1:0]    coef_m;

  coef_bank #(.TAPS(TAPS), .COEF_W(COEF_W)) u_coef (
    .clk, .rst_n, .we(coef_we), .waddr(coef_addr), .wdata(coef_wdata), .coef(coef)
  );

  for (genvar k = 0; k < TAPS; k++) begin : g_coef_split
    logic signed [CHW-1:0] hh;
    logic signed [CLW-1:0] hl;
    logic signed [CMW-1:0] hm;
    ks_split #(.W(COEF_W), .L(SPLIT)) u_split (.v(signed'(coef[k])), .hi(hh), .lo(hl), .mid(hm));
    assign coef_h[k] = hh;
    assign coef_l[k] = hl;
    assign coef_m[k] = hm;
  end

  // ---- input conversion ----
  logic signed [XHW-1:0] x_h;
  logic signed [XLW-1:0] x_l;
  logic signed [XMW-1:0] x_m;

  ks_split #(.W(DATA_W), .L(SPLIT)) u_in_split (.v(x_in), .hi(x_h), .lo(x_l), .mid(x_m));

  // ---- three sub-filters ----
  logic                  v_a, v_c, v_m;
  logic signed [AAW-1:0] y_a;
  logic signed [ACW-1:0] y_c;
  logic signed [AMW-1:0] y_m;

  transposed_fir #(.XW(XHW), .CW(CHW), .TAPS(TAPS), .LEVELS(LEVELS)) u_fir_h (
    .clk, .rst_n, .in_valid, .x(x_h), .coef(coef_h), .out_valid(v_a), .y(y_a)
  );
  transposed_fir #(.XW(XLW), .CW(CLW), .TAPS(TAPS), .LEVELS(LEVELS)) u_fir_l (
    .clk, .rst_n, .in_valid, .x(x_l), .coef(coef_l), .out_valid(v_c), .y(y_c)
  );
  transposed_fir #(.XW(XMW), .CW(CMW), .TAPS(TAPS), .LEVELS(LEVELS)) u_fir_m (
    .clk, .rst_n, .in_valid, .x(x_m), .coef(coef_m), .out_valid(v_m), .y(y_m)
  );

  // ---- output conversion ----
  logic signed [OUT_W-1:0] y_comb;

  ks_combine #(.AW(AAW), .CW(ACW), .MW(AMW), .L(SPLIT), .OW(OUT_W)) u_combine (
    .a(y_a), .c(y_c), .m(y_m), .y(y_comb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_out     <= '0;
    end else begin
      out_valid <= v_a;
      if (v_a) y_out <= y_comb;
    end
  end

  // the three sub-filters see the same in_valid and must stay in step
  a_in_step: assert property (@(posedge clk) (v_a == v_c) && (v_a == v_m))
    else $error("sub-filters out of step");

endmodule
