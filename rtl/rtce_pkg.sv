// rtce_pkg: types, number format and helpers shared by the co-emulator RTL.
//
// All electrical quantities in the fabric datapath are signed fixed-point
// per-unit values: FX_W bits, FX_F of them fraction bits (range about +-2048,
// resolution about 1e-6). The fixed-point format is a choice of this design;
// the exchanged values travel inside 64-bit link words as the reference
// implementation does. Configuration targets, branch kinds and the layout of
// the 64-bit fast-link word are also defined here.
package rtce_pkg;

  localparam int FX_W = 32;
  localparam int FX_F = 20;

  typedef logic signed [FX_W-1:0] fx_t;


  // Node index: 0 is ground, 1..N are the buses of the area.
  localparam int NODE_W = 5;
  typedef logic [NODE_W-1:0] node_t;

  // Configuration bus targets.
  typedef enum logic [2:0] {
    CFG_GINV   = 3'd0,   // inverse conductance matrices: addr = set*N*N + r*N + c
    CFG_BRANCH = 3'd1,   // branch table: addr = b*4 + {0:node_a,1:node_b,2:kind,3:geq}
    CFG_LINE   = 3'd2,   // line table:   addr = e*2 + {0:node,1:1/Z}
    CFG_THRESH = 3'd3    // thresholds:   addr 0:|V|, 1:|I|, 2:|LTE|
  } cfg_tgt_e;

  // Branch kinds of the companion-model bank.
  typedef enum logic [1:0] {
    BR_R = 2'd0,
    BR_L = 2'd1,
    BR_C = 2'd2
  } br_kind_e;

  // Abnormal-condition flags stored with every bus sample.
  typedef struct packed {
    logic lte;   // |LTE| above threshold
    logic oc;    // |I| above threshold (over-current)
    logic ov;    // |V| above threshold (over-voltage)
  } abn_flags_t;

  // One 64-bit word on the board-to-board link.
  typedef struct packed {
    logic [7:0]  idx;     // word index inside the frame
    logic [23:0] step;    // time-step count, low bits
    fx_t         value;   // payload
  } link_word_t;

  // Fixed-point multiply with rounding, result truncated to FX_W bits.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = (2*FX_W)'(a) * (2*FX_W)'(b);
    p = p + (2*FX_W)'(1 <<< (FX_F-1));
    return fx_t'(p >>> FX_F);
  endfunction

  function automatic fx_t fx_abs(fx_t a);
    return (a < 0) ? -a : a;
  endfunction

endpackage
