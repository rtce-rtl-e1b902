// lte_unit: local truncation error (LTE) estimator for the bus state variables.
//
// For linear equipment the LTE of step n is C_{p+1} dt^{p+1} (p+1)! times the
// divided difference of the state over t_n .. t_{n-1-p}. With the constant
// time-step of the emulator this product is exactly the (p+1)-th backward
// difference of the samples, so the unit keeps the last P+1 values of each
// bus and forms that difference with adders only, then scales it by C_FX.
// For equipment solved with a predictor/corrector, mode_nl selects the second
// estimate, C/(1-C) times (corrector - predictor).
//
// Interface: idx selects the bus, x is its value of the present step and
// x_pred its predictor; lte is combinational from them. A pulse on upd shifts x
// into the history of bus idx. Until a bus has P+1 stored values its estimate
// is zero. Defaults: P = 2 with C = -1/12, the trapezoidal rule; the estimator
// formulas follow the reference design, the order, constant, warm-up rule and
// the choice of bus voltage as the state variable are this design's.
module lte_unit
  import rtce_pkg::*;
#(
  parameter int  N    = 12,
  parameter int  P    = 2,
  parameter fx_t C_FX = -fx_t'(87381)      // -1/12 in FX_F = 20 format
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] idx,
  input  fx_t                  x,
  input  fx_t                  x_pred,
  input  logic                 mode_nl,
  input  logic                 upd,
  output fx_t                  lte
);
  localparam int AW = FX_W + P + 3;                 // room for the differences
  typedef logic signed [AW-1:0] acc_t;
  // C/(1-C) for the predictor/corrector estimate
  localparam longint C_NL_L = (longint'(C_FX) * (longint'(1) <<< FX_F)) /
                              ((longint'(1) <<< FX_F) - longint'(C_FX));
  localparam fx_t C_NL_FX = fx_t'(C_NL_L);

  fx_t                  hist [N][P+1];              // [0] = newest
  logic [$clog2(P+2):0] fill [N];

  acc_t pts [P+2];
  acc_t diff;
  logic signed [AW+FX_W-1:0] prod;
  fx_t  lte_lin, lte_nl;

  always_comb begin
    pts[0] = acc_t'(x);
    for (int k = 1; k <= P + 1; k++) pts[k] = acc_t'(hist[idx][k-1]);
    for (int lvl = 1; lvl <= P + 1; lvl++)
      for (int k = 0; k <= P + 1 - lvl; k++)
        pts[k] = pts[k] - pts[k+1];
    diff    = pts[0];
    prod    = (AW+FX_W)'(diff) * (AW+FX_W)'(C_FX);
    lte_lin = fx_t'((prod + (AW+FX_W)'(1 <<< (FX_F-1))) >>> FX_F);
    lte_nl  = fx_mul(C_NL_FX, x - x_pred);
    if (mode_nl)                   lte = lte_nl;
    else if (int'(fill[idx]) > P)  lte = lte_lin;
    else                           lte = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < N; b++) begin
        fill[b] <= '0;
        for (int k = 0; k <= P; k++) hist[b][k] <= '0;
      end
    end else if (upd) begin
      hist[idx][0] <= x;
      for (int k = 1; k <= P; k++) hist[idx][k] <= hist[idx][k-1];
      if (int'(fill[idx]) <= P) fill[idx] <= fill[idx] + 1'b1;
    end
  end

endmodule
