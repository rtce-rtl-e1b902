// tb_rtce_board: one board emulating a small two-bus area. Bus 1 has a
// sinusoidal current source, a resistor and an inductive load to ground; bus
// 2 a resistor and a capacitor to ground; a line joins bus 1 and bus 2. The
// line's two ends sit on link 0 and link 1, and the links are looped back
// through link models (link 0 out -> link 1 in and back), so the line's
// traveling-wave terms really cross the fast-link framing. A reference model
// in real arithmetic steps the same circuit; after every step the solved bus
// voltages, load currents and the records in the measurement memory are
// compared with it. At step 15 a command switches to the second matrix set
// and opens the inductive load; the change must take effect at the next step
// boundary. Also checked: step latency below the step length, the neighbour
// wait counted, no overrun and no link error; at the end one link delivers
// a frame with the wrong step count, which must raise the link error.
module tb_rtce_board;
  import rtce_pkg::*;
  localparam int N = 2, NB_BR = 4, NLINK = 2, NLPL = 2, NSET = 2, SC = 400, D = 2;
  localparam int MAW = $clog2(N) + 2;
  logic clk = 0, rst_n = 0, run = 0;
  logic cfg_we; logic [2:0] cfg_tgt; logic [15:0] cfg_addr; logic [31:0] cfg_data;
  fx_t src_inj [N];
  logic cmd_we; logic [3:0] cmd_addr; logic [31:0] cmd_wdata, cmd_rdata;
  logic [MAW-1:0] meas_addr; logic [31:0] meas_rdata;
  logic [63:0] tx_tdata [NLINK], rx_tdata [NLINK];
  logic tx_tvalid [NLINK], tx_tready [NLINK], tx_tlast [NLINK];
  logic rx_tvalid [NLINK], rx_tready [NLINK], rx_tlast [NLINK];
  logic [31:0] step; logic tick, step_done, abnormal, topo_changed, overrun, link_err;
  logic skew = 1'b0;
  logic [N-1:0] abn_bus; abn_flags_t abn_kind; logic [15:0] overruns, step_latency, rx_wait;
  fx_t v [N], i_shunt [N];
  int checks = 0, failures = 0;
  int topo = 0;
  always @(posedge clk) if (topo_changed) topo++;

  rtce_board #(.N(N), .NB_BR(NB_BR), .NLINK(NLINK), .NLPL(NLPL), .NSET(NSET),
               .STEP_CYCLES(SC), .DLY_STEPS(D)) dut (.*);

  axis_link_model #(.LAT(20)) u_l01 (.clk, .rst_n, .hold(1'b0), .skew(skew),
    .s_tdata(tx_tdata[0]), .s_tvalid(tx_tvalid[0]), .s_tready(tx_tready[0]), .s_tlast(tx_tlast[0]),
    .m_tdata(rx_tdata[1]), .m_tvalid(rx_tvalid[1]), .m_tready(rx_tready[1]), .m_tlast(rx_tlast[1]));
  axis_link_model #(.LAT(20)) u_l10 (.clk, .rst_n, .hold(1'b0), .skew(1'b0),
    .s_tdata(tx_tdata[1]), .s_tvalid(tx_tvalid[1]), .s_tready(tx_tready[1]), .s_tlast(tx_tlast[1]),
    .m_tdata(rx_tdata[0]), .m_tvalid(rx_tvalid[0]), .m_tready(rx_tready[0]), .m_tlast(rx_tlast[0]));

  always #5 clk = ~clk;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam real S = 2.0 ** FX_F;
  function automatic longint q(real x); return longint'(x * S); endfunction
  function automatic real r(longint x); return real'(x) / S; endfunction

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++; $display("FAIL %s: got %f exp %f", what, got, exp);
    end
  endtask
  task automatic cfg(cfg_tgt_e t, int a, longint d);
    cfg_we = 1; cfg_tgt = t; cfg_addr = 16'(a); cfg_data = 32'(d); @(posedge clk); #1 cfg_we = 0;
  endtask
  task automatic cmd(int a, logic [31:0] d);
    cmd_we = 1; cmd_addr = 4'(a); cmd_wdata = d; @(posedge clk); #1 cmd_we = 0;
  endtask
  task automatic meas(int a, output real x);
    meas_addr = MAW'(a); @(posedge clk); #1 x = r(longint'(fx_t'(meas_rdata)));
  endtask

  // circuit
  localparam real GR1 = 1.0, GL = 0.02, GR2 = 0.5, GC = 1.5, YZ = 0.05;
  real ginv [NSET][N];
  // reference state
  real ihl, ihc, ik1, ik2, s1q [$], s2q [$];

  initial begin
    real v1, v2, j1, j2, il, ir1, ic, ir2, gl_en;
    real mv, mi;
    cfg_we = 0; cfg_tgt = 0; cfg_addr = 0; cfg_data = 0; cmd_we = 0; cmd_addr = 0; cmd_wdata = 0;
    meas_addr = 0;
    src_inj[0] = 0; src_inj[1] = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // matrices, quantized the way the hardware holds them
    ginv[0][0] = r(q(1.0 / (GR1 + GL + YZ)));  ginv[0][1] = r(q(1.0 / (GR2 + GC + YZ)));
    ginv[1][0] = r(q(1.0 / (GR1 + YZ)));       ginv[1][1] = ginv[0][1];
    for (int s = 0; s < NSET; s++)
      for (int rr = 0; rr < N; rr++)
        for (int c = 0; c < N; c++)
          cfg(CFG_GINV, (s*N + rr)*N + c, rr == c ? q(ginv[s][rr]) : 0);
    // branches: 0 R bus1, 1 L bus1, 2 R bus2, 3 C bus2
    cfg(CFG_BRANCH, 0, 1); cfg(CFG_BRANCH, 1, 0); cfg(CFG_BRANCH, 2, BR_R); cfg(CFG_BRANCH, 3, q(GR1));
    cfg(CFG_BRANCH, 4, 1); cfg(CFG_BRANCH, 5, 0); cfg(CFG_BRANCH, 6, BR_L); cfg(CFG_BRANCH, 7, q(GL));
    cfg(CFG_BRANCH, 8, 2); cfg(CFG_BRANCH, 9, 0); cfg(CFG_BRANCH, 10, BR_R); cfg(CFG_BRANCH, 11, q(GR2));
    cfg(CFG_BRANCH, 12, 2); cfg(CFG_BRANCH, 13, 0); cfg(CFG_BRANCH, 14, BR_C); cfg(CFG_BRANCH, 15, q(GC));
    // line ends: e0 (link 0 word 0) at bus 1, e2 (link 1 word 0) at bus 2, others unused
    for (int e = 0; e < NLINK*NLPL; e++) begin
      cfg(CFG_LINE, 2*e, e == 0 ? 1 : e == 2 ? 2 : 0);
      cfg(CFG_LINE, 2*e + 1, (e == 0 || e == 2) ? q(YZ) : 0);
    end
    cfg(CFG_THRESH, 0, q(100.0)); cfg(CFG_THRESH, 1, q(100.0)); cfg(CFG_THRESH, 2, q(100.0));
    ihl = 0; ihc = 0; ik1 = 0; ik2 = 0; gl_en = 1.0;
    run = 1;
    for (int n = 0; n < 40; n++) begin
      int sel;
      real src;
      src = 0.8 * $sin(2.0 * 3.14159265 * n / 25.0);
      src_inj[0] = fx_t'(q(src)); src_inj[1] = 0;
      if (n == 15) begin cmd(0, 1); cmd(1, 32'hFFFF_FFFD); end
      sel = (n >= 15) ? 1 : 0;
      if (n == 15) gl_en = 0.0;
      while (!tick) @(posedge clk);
      while (!step_done) @(posedge clk);
      #1;
      // reference step
      j1 = src - (gl_en > 0.5 ? ihl : 0.0) - ik1;
      j2 = -ihc - ik2;
      v1 = ginv[sel][0] * j1;
      v2 = ginv[sel][1] * j2;
      ir1 = GR1 * v1; ir2 = GR2 * v2;
      il  = gl_en > 0.5 ? GL * v1 + ihl : 0.0;
      ihl = gl_en > 0.5 ? il + GL * v1 : 0.0;
      ic  = GC * v2 + ihc;
      ihc = -(ic + GC * v2);
      s1q.push_back(2.0 * YZ * v1 + ik1);
      s2q.push_back(2.0 * YZ * v2 + ik2);
      ik1 = (n + 1 - D >= 0) ? -s2q[n + 1 - D] : 0.0;
      ik2 = (n + 1 - D >= 0) ? -s1q[n + 1 - D] : 0.0;
      check($sformatf("v1 step %0d", n), r(longint'(v[0])), v1, 1e-3);
      check($sformatf("v2 step %0d", n), r(longint'(v[1])), v2, 1e-3);
      check($sformatf("i1 step %0d", n), r(longint'(i_shunt[0])), ir1 + il, 1e-3);
      check($sformatf("i2 step %0d", n), r(longint'(i_shunt[1])), ir2 + ic, 1e-3);
      meas(0, mv); meas(1, mi);
      check("record V1", mv, v1, 1e-3);
      check("record I1", mi, ir1 + il, 1e-3);
      check("latency within step", step_latency < SC, 1, 0);
      check("neighbour wait seen", rx_wait > 0, 1, 0);
    end
    check("one topology change", topo, 1, 0);
    check("no overrun", overrun, 0, 0);
    check("no link error", link_err, 0, 0);
    check("voltage nonzero", (v1 > 0.05 || v1 < -0.05), 1, 0);
    // a frame that carries the wrong step count must raise the link error
    skew = 1'b1;
    repeat (2) @(posedge clk iff step_done);
    skew = 1'b0;
    repeat (2) @(posedge clk);
    check("wrong-step frame flagged", link_err, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
