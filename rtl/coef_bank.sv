// coef_bank: programmable coefficient store of the filter, one register per tap.
//
// A coefficient is written when we is high at a rising clock edge: word waddr
// takes wdata, and the new value is seen on coef from the next cycle on.
// Addresses at or above TAPS are ignored. Reset (asynchronous, active low)
// clears every coefficient, so a freshly reset filter outputs zeros.
// The design calls for dynamically programmable coefficients; this write
// port and the reset value are this implementation's choices.
module coef_bank #(
  parameter int unsigned TAPS   = 8,
  parameter int unsigned COEF_W = 16,
  localparam int unsigned AW    = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           we,
  input  logic [AW-1:0]                  waddr,
  input  logic signed [COEF_W-1:0]       wdata,
  output logic [TAPS-1:0][COEF_W-1:0]    coef
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coef <= '0;
    end else if (we && (32'(waddr) < TAPS)) begin
      coef[waddr] <= wdata;
    end
  end

endmodule
