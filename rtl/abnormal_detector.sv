// abnormal_detector: threshold test of one bus sample.
//
// A bus is in an abnormal condition when the magnitude of its LTE, its
// measured current or its voltage exceeds the programmed threshold; each test
// raises its own flag so the concentrator software can tell an over-current
// from a transient seen only in the LTE. Purely combinational; the caller
// registers the result with the sample. The three tests follow the reference
// design; doing them in logic, next to the sampler, is this design's choice.
module abnormal_detector
  import rtce_pkg::*;
(
  input  fx_t        v,
  input  fx_t        i,
  input  fx_t        lte,
  input  fx_t        th_v,
  input  fx_t        th_i,
  input  fx_t        th_lte,
  output abn_flags_t flags
);
  always_comb begin
    flags.ov  = fx_abs(v)   > th_v;
    flags.oc  = fx_abs(i)   > th_i;
    flags.lte = fx_abs(lte) > th_lte;
  end
endmodule
