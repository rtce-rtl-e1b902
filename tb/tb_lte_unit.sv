// tb_lte_unit: checks the LTE estimator against closed-form results.
// A cubic sequence x(n) = k n^3 has third backward difference 6k, so with
// C = -1/12 the estimate must be -k/2; a quadratic must give zero. Random
// sequences are checked against C times x(n)-3x(n-1)+3x(n-2)-x(n-3), the
// warm-up rule (zero until three values are stored) is checked on a second
// bus, and the predictor/corrector form against C/(1-C) = -1/13 in real
// arithmetic.
module tb_lte_unit;
  import rtce_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic [1:0] idx;
  fx_t x, x_pred, lte;
  logic mode_nl, upd;
  int checks = 0, failures = 0;

  lte_unit #(.N(N), .P(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp, longint tol = 0);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic push(int b, fx_t val);
    idx = 2'(b); x = val; upd = 1;
    @(posedge clk); #1 upd = 0;
  endtask

  longint hist [4];
  initial begin
    idx = 0; x = 0; x_pred = 0; mode_nl = 0; upd = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // cubic on bus 0: k = 0.25
    for (int n = 0; n < 8; n++) begin
      fx_t val;
      val = fx_t'(longint'(n*n*n) * (1 <<< FX_F) / 4);
      idx = 0; x = val; #1;
      if (n >= 3) check("cubic", lte, -(1 <<< FX_F) / 8, 1);
      else        check("warm-up", lte, 0);
      push(0, val);
    end
    // quadratic on bus 1: LTE zero
    for (int n = 0; n < 6; n++) begin
      fx_t val;
      val = fx_t'(longint'(n*n) * (1 <<< FX_F) * 3);
      idx = 1; x = val; #1;
      if (n >= 3) check("quadratic", lte, 0, 1);
      push(1, val);
    end
    // random sequences on bus 2
    for (int k = 0; k < 4; k++) hist[k] = 0;
    for (int n = 0; n < 40; n++) begin
      fx_t val;
      longint d, e;
      val = fx_t'($urandom_range(0, 2000000)) - fx_t'(1000000);
      idx = 2; x = val; #1;
      d = longint'(val) - 3*hist[0] + 3*hist[1] - hist[2];
      e = (d * -87381 + (1 <<< (FX_F-1))) >>> FX_F;
      if (n >= 3) check("random", lte, e);
      push(2, val);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = longint'(val);
    end
    // predictor/corrector estimate
    mode_nl = 1;
    for (int n = 0; n < 20; n++) begin
      real er;
      x      = fx_t'($urandom_range(0, 4000000)) - fx_t'(2000000);
      x_pred = fx_t'($urandom_range(0, 4000000)) - fx_t'(2000000);
      #1;
      er = -(real'(x) - real'(x_pred)) / 13.0;
      check("eq4", lte, longint'(er), 2 + longint'((er < 0 ? -er : er) * 2.0e-5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
