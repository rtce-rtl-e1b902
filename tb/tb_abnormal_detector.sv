// tb_abnormal_detector: random bus samples and thresholds; each flag must be
// set exactly when the magnitude is strictly above its threshold, including
// the equal and negative cases.
module tb_abnormal_detector;
  import rtce_pkg::*;
  fx_t v, i, lte, th_v, th_i, th_lte;
  abn_flags_t flags;
  int checks = 0, failures = 0;

  abnormal_detector dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fx_t rnd();
    return fx_t'($urandom_range(0, 2000)) - fx_t'(1000);
  endfunction

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic ev, ei, el;
      v = rnd(); i = rnd(); lte = rnd();
      th_v = fx_t'($urandom_range(0, 1000)); th_i = fx_t'($urandom_range(0, 1000));
      th_lte = fx_t'($urandom_range(0, 1000));
      if (n % 7 == 0) th_v = (v < 0) ? -v : v;      // equal: no flag
      if (n % 5 == 0) i = -th_i - 1;                // just above, negative
      #1;
      ev = (v < 0 ? -v : v) > th_v;
      ei = (i < 0 ? -i : i) > th_i;
      el = (lte < 0 ? -lte : lte) > th_lte;
      checks++;
      if (flags.ov !== ev || flags.oc !== ei || flags.lte !== el) begin
        failures++;
        $display("FAIL v=%0d i=%0d lte=%0d flags=%b", v, i, lte, flags);
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
