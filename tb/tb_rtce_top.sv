// tb_rtce_top: end-to-end co-emulation of the four-area system with every
// parameter at its default (20 us steps of 2000 clocks, areas of 6, 3, 12 and
// 9 buses, 15-word link frames, 32-step line delay), reproducing the
// over-current case study.
//
// Power side: every area is a chain of buses joined by series resistors,
// with a resistive load on every bus, an inductive load and a 60 Hz source on
// bus 1, and a line from its bus 1 to the last bus of the next area (a ring
// of four lines through the eight fast links, modelled with 0.95 us latency).
// The testbench computes each area's conductance matrices, inverts them and
// loads the inverses. Matrix set 0 is normal operation, set 1 adds a fault
// load on bus 7 of area 3, set 2 has bus 7's load disconnected.
//
// Communication side (software on the real boards, modelled here): every
// 833 steps (60 Hz) each concentrator (TDC) reads all TMU records of its
// board through the measurement port; the record passes a transmission-level
// delay of 50 steps (1 ms) to the TDC; a TDC that sees a flagged bus sends a
// message that reaches the super concentrator (STDC) 250 steps (5 ms) later;
// for a bus in over-current the STDC's trip command reaches the board's command memory 250 steps after
// that and opens the load at the over-current bus.
//
// Sequence: thresholds are set at step 850 from the currents seen so far; the
// fault is applied at step 900 (case study 1); at step 1200 one link is held
// for 4000 clocks, which makes a board overrun its step and the links apply
// backpressure. At step 3600 the breaker is reclosed and at step 3700 the
// fault is applied again with the network link on area 3's path to its TDC
// broken (case study 2): the rerouted TDC-to-STDC path is taken as 4000 steps
// (80 ms), so the over-current lasts much longer before the trip. The test counts every mechanism (steps, neighbour waits,
// backpressure, overruns, topology changes, LTE and over-current flags, TDC
// reports, STDC commands) and fails if one never happened; it also checks no
// flags before the fault, that the fault current is cut after the trip, that
// the step compute time grows with the matrix size, and no link errors.
module tb_rtce_top;
  import rtce_pkg::*;
  localparam int NB = 4, NMAX = 12, NLINK = 2, NLPL = 15, NB_BR = 32, SC = 2000;
  localparam int MAW = $clog2(NMAX) + 2;
  localparam int NA [NB] = '{6, 3, 12, 9};
  localparam int FB = 2, FBUS = 7;           // fault board (area 3) and bus
  localparam int REPORT = 833, TLN_TMU = 50, TLN_TDC = 250, TLN_CMD = 250;
  localparam int TLN_TDC2 = 4000;                        // rerouted TDC path after the link failure
  localparam int TH_STEP = 850, FAULT_STEP = 900, HOLD_STEP = 1200;
  localparam int RECLOSE_STEP = 3600, FAULT2_STEP = 3700, END_STEP = 8600;

  logic clk = 0, rst_n = 0, run = 0;
  logic        cfg_we [NB]; logic [2:0] cfg_tgt [NB]; logic [15:0] cfg_addr [NB];
  logic [31:0] cfg_data [NB];
  fx_t         src_inj [NB][NMAX];
  logic        cmd_we [NB]; logic [3:0] cmd_addr [NB]; logic [31:0] cmd_wdata [NB], cmd_rdata [NB];
  logic [MAW-1:0] meas_addr [NB]; logic [31:0] meas_rdata [NB];
  logic [63:0] ax_tx_tdata [NB][NLINK], ax_rx_tdata [NB][NLINK];
  logic ax_tx_tvalid [NB][NLINK], ax_tx_tready [NB][NLINK], ax_tx_tlast [NB][NLINK];
  logic ax_rx_tvalid [NB][NLINK], ax_rx_tready [NB][NLINK], ax_rx_tlast [NB][NLINK];
  logic [31:0] step [NB];
  logic tick [NB], step_done [NB], abnormal [NB], topo_changed [NB], overrun [NB], link_err [NB];
  logic [NMAX-1:0] abn_bus [NB];
  abn_flags_t abn_kind [NB];
  logic [15:0] overruns [NB], step_latency [NB], rx_wait [NB];
  fx_t v [NB][NMAX], i_shunt [NB][NMAX];
  logic hold_l [NB][NLINK];

  int checks = 0, failures = 0;

  rtce_top dut (.*);

  // ring of links: board g link 0 -> board g+1 link 1, board g link 1 -> board g-1 link 0
  for (genvar g = 0; g < NB; g++) begin : g_ring
    localparam int NX = (g + 1) % NB;
    localparam int PV = (g + NB - 1) % NB;
    axis_link_model u_fwd (.clk, .rst_n, .hold(hold_l[g][0]), .skew(1'b0),
      .s_tdata(ax_tx_tdata[g][0]), .s_tvalid(ax_tx_tvalid[g][0]), .s_tready(ax_tx_tready[g][0]),
      .s_tlast(ax_tx_tlast[g][0]),
      .m_tdata(ax_rx_tdata[NX][1]), .m_tvalid(ax_rx_tvalid[NX][1]), .m_tready(ax_rx_tready[NX][1]),
      .m_tlast(ax_rx_tlast[NX][1]));
    axis_link_model u_bwd (.clk, .rst_n, .hold(hold_l[g][1]), .skew(1'b0),
      .s_tdata(ax_tx_tdata[g][1]), .s_tvalid(ax_tx_tvalid[g][1]), .s_tready(ax_tx_tready[g][1]),
      .s_tlast(ax_tx_tlast[g][1]),
      .m_tdata(ax_rx_tdata[PV][0]), .m_tvalid(ax_rx_tvalid[PV][0]), .m_tready(ax_rx_tready[PV][0]),
      .m_tlast(ax_rx_tlast[PV][0]));
  end

  always #5 clk = ~clk;

  // watchdog: END_STEP steps plus margin
  initial begin
    #(64'd10 * SC * (END_STEP + 600));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real S = 2.0 ** FX_F;
  localparam real PI = 3.14159265358979;
  function automatic longint q(real x); return longint'(x * S); endfunction
  function automatic real r(fx_t x); return real'(longint'(x)) / S; endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // ---------------------------------------------------------------- circuit
  localparam real GLOAD = 1.0, GSER = 100.0, GL = 0.001, YZ = 0.05, GF = 3.0, AMP = 1.0;

  // G of area g for matrix set s, inverted by Gauss-Jordan
  task automatic build_ginv(int g, int s, output real gi [NMAX][NMAX]);
    int n;
    real a [NMAX][2*NMAX];
    n = NA[g];
    for (int i = 0; i < n; i++) for (int j = 0; j < 2*n; j++) a[i][j] = (j == n + i) ? 1.0 : 0.0;
    for (int k = 0; k < n; k++) a[k][k] += GLOAD;
    for (int k = 0; k < n - 1; k++) begin
      a[k][k] += GSER; a[k+1][k+1] += GSER; a[k][k+1] -= GSER; a[k+1][k] -= GSER;
    end
    a[0][0] += GL + YZ;
    a[n-1][n-1] += YZ;
    if (g == FB && s == 1) a[FBUS-1][FBUS-1] += GF;
    if (g == FB && s == 2) a[FBUS-1][FBUS-1] -= GLOAD;
    for (int c = 0; c < n; c++) begin
      real p;
      p = a[c][c];
      for (int j = 0; j < 2*n; j++) a[c][j] /= p;
      for (int i = 0; i < n; i++) if (i != c) begin
        real f;
        f = a[i][c];
        for (int j = 0; j < 2*n; j++) a[i][j] -= f * a[c][j];
      end
    end
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) gi[i][j] = a[i][n + j];
  endtask

  task automatic cfg(int g, cfg_tgt_e t, int a, longint d);
    cfg_we[g] = 1; cfg_tgt[g] = t; cfg_addr[g] = 16'(a); cfg_data[g] = 32'(d);
    @(posedge clk); #1 cfg_we[g] = 0;
  endtask
  task automatic cmd(int g, int a, logic [31:0] d);
    cmd_we[g] = 1; cmd_addr[g] = 4'(a); cmd_wdata[g] = d;
    @(posedge clk); #1 cmd_we[g] = 0;
  endtask
  task automatic br(int g, int b, int na, int nb, br_kind_e k, real geq);
    cfg(g, CFG_BRANCH, 4*b, na); cfg(g, CFG_BRANCH, 4*b + 1, nb);
    cfg(g, CFG_BRANCH, 4*b + 2, longint'(k)); cfg(g, CFG_BRANCH, 4*b + 3, q(geq));
  endtask

  task automatic configure(int g);
    int n;
    real gi [NMAX][NMAX];
    n = NA[g];
    for (int s = 0; s < 4; s++) begin
      build_ginv(g, s, gi);
      for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) cfg(g, CFG_GINV, (s*n + i)*n + j, q(gi[i][j]));
    end
    for (int b = 0; b < NB_BR; b++) begin
      if (b < n)               br(g, b, b + 1, 0, BR_R, GLOAD);
      else if (b < 2*n - 1)    br(g, b, b - n + 1, b - n + 2, BR_R, GSER);
      else if (b == 2*n - 1)   br(g, b, 1, 0, BR_L, GL);
      else if (b == 2*n && g == FB) br(g, b, FBUS, 0, BR_R, GF);
      else                     br(g, b, 0, 0, BR_R, 0.0);
    end
    for (int e = 0; e < NLINK*NLPL; e++) begin
      cfg(g, CFG_LINE, 2*e, e == 0 ? 1 : e == NLPL ? n : 0);
      cfg(g, CFG_LINE, 2*e + 1, (e == 0 || e == NLPL) ? q(YZ) : 0);
    end
    // fault branch open until the fault
    cmd(g, 1, ~(32'd1 << (2*n)));
  endtask

  // ---------------------------------------------------------------- sources
  for (genvar g = 0; g < NB; g++) begin : g_src
    always @(posedge clk) if (tick[g])
      src_inj[g][0] <= fx_t'(q(AMP * $sin(2.0 * PI * 60.0 * 20.0e-6 * real'(step[g]) + 0.5 * g)));
  end

  // ---------------------------------------------------------------- monitors
  int n_steps, n_wait, n_bp, n_overrun, n_topo, n_lte, n_oc, n_report, n_cmd, n_err;
  int flags_before, oc_after_trip, lte_fault_step;
  real peak [NB];
  int comp [NB];
  int cur_step;
  logic [15:0] prev_ovr [NB] = '{default: '0};
  int trip_step, trip2_step;

  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < NB; g++) begin
      if (step_done[g]) begin
        n_steps++;
        if (rx_wait[g] > 0) n_wait++;
        if (abn_kind[g].lte) n_lte++;
        if (abn_kind[g].oc) n_oc++;
        if (abnormal[g] && cur_step > TH_STEP + 1 && cur_step < FAULT_STEP) flags_before++;
        if (g == FB && abn_kind[g].lte && lte_fault_step < 0 && cur_step >= FAULT_STEP) lte_fault_step = cur_step;
        if (g == FB && abn_kind[g].oc && trip_step > 0 && cur_step > trip_step + 5 && cur_step < RECLOSE_STEP) oc_after_trip++;
        if (g == FB && abn_kind[g].oc && trip2_step > 0 && cur_step > trip2_step + 5) oc_after_trip++;
        if (cur_step > 20 && cur_step < TH_STEP)
          for (int k = 0; k < NA[g]; k++) if (r(i_shunt[g][k]) > peak[g] || -r(i_shunt[g][k]) > peak[g])
            peak[g] = r(i_shunt[g][k]) > 0 ? r(i_shunt[g][k]) : -r(i_shunt[g][k]);
        if (cur_step == 500) comp[g] = int'(step_latency[g]) - int'(rx_wait[g]);
      end
      if (topo_changed[g] && cur_step > 10) n_topo++;
      if (overruns[g] != prev_ovr[g]) n_overrun++;
      prev_ovr[g] = overruns[g];
      for (int l = 0; l < NLINK; l++) if (ax_rx_tvalid[g][l] && !ax_rx_tready[g][l]) n_bp++;
      if (link_err[g]) n_err++;
    end
    if (step_done[0]) cur_step = int'(step[0]);
  end

  // ---------------------------------------------------------------- processor models
  typedef struct { int due; int kind; int g; int bus; bit oc; } ev_t;   // kind 0: TDC eval, 1: STDC, 2: trip
  ev_t evq [$];
  logic [31:0] rec [NB][4*NMAX];
  logic [31:0] seen_rec [NB][4*NMAX];

  task automatic read_records(int g);
    for (int a = 0; a < 4*NA[g]; a++) begin
      meas_addr[g] = MAW'(a);
      @(posedge clk); #1 rec[g][a] = meas_rdata[g];
    end
  endtask

  initial begin
    n_steps = 0; n_wait = 0; n_bp = 0; n_overrun = 0; n_topo = 0; n_lte = 0; n_oc = 0;
    n_report = 0; n_cmd = 0; n_err = 0; flags_before = 0; oc_after_trip = 0; lte_fault_step = -1;
    cur_step = 0; trip_step = -1; trip2_step = -1;
    for (int g = 0; g < NB; g++) begin
      cfg_we[g] = 0; cfg_tgt[g] = 0; cfg_addr[g] = 0; cfg_data[g] = 0;
      cmd_we[g] = 0; cmd_addr[g] = 0; cmd_wdata[g] = 0; meas_addr[g] = 0;
      peak[g] = 0.0; comp[g] = 0;
      for (int k = 0; k < NMAX; k++) src_inj[g][k] = 0;
      for (int l = 0; l < NLINK; l++) hold_l[g][l] = 0;
    end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int g = 0; g < NB; g++) configure(g);
    run = 1;
    while (cur_step < END_STEP) begin
      int s;
      @(posedge clk); #1;
      if (!step_done[0]) continue;
      s = int'(step[0]);
      if (s == TH_STEP)
        for (int g = 0; g < NB; g++) begin
          cfg(g, CFG_THRESH, 1, q(1.5 * peak[g]));
          cfg(g, CFG_THRESH, 2, q(0.001));
        end
      if (s == FAULT_STEP) begin
        cmd(FB, 0, 32'd1);
        cmd(FB, 1, 32'hFFFF_FFFF);
        $display("fault applied at step %0d", s);
      end
      if (s == RECLOSE_STEP) begin                     // breaker reclosed, fault gone
        cmd(FB, 0, 32'd0);
        cmd(FB, 1, ~(32'd1 << (2*NA[FB])));
      end
      if (s == FAULT2_STEP) begin
        cmd(FB, 0, 32'd1);
        cmd(FB, 1, 32'hFFFF_FFFF);
        $display("fault applied with the TDC link down at step %0d", s);
      end
      if (s == HOLD_STEP) fork
        begin hold_l[1][0] = 1; repeat (4000) @(posedge clk); hold_l[1][0] = 0; end
      join_none
      if (s % REPORT == 0 && s > 0)
        for (int g = 0; g < NB; g++) begin
          read_records(g);
          seen_rec[g] = rec[g];
          evq.push_back('{due: s + TLN_TMU, kind: 0, g: g, bus: 0, oc: 0});
        end
      for (int k = 0; k < evq.size(); k++) begin
        if (evq[k].due > s) continue;
        case (evq[k].kind)
          0: for (int b = 0; b < NA[evq[k].g]; b++)          // TDC: examine the records
               if (seen_rec[evq[k].g][4*b + 3][29] || seen_rec[evq[k].g][4*b + 3][30]) begin  // held LTE / over-current
                 n_report++;
                 evq.push_back('{due: s + (s > FAULT2_STEP && evq[k].g == FB ? TLN_TDC2 : TLN_TDC), kind: 1, g: evq[k].g, bus: b + 1,
                                 oc: seen_rec[evq[k].g][4*b + 3][29]});
                 $display("TDC %0d: abnormal condition at bus %0d (step %0d)", evq[k].g, b + 1, s);
               end
          1: if (evq[k].oc) begin                            // STDC: trip over-current buses
               n_cmd++;
               evq.push_back('{due: s + TLN_CMD, kind: 2, g: evq[k].g, bus: evq[k].bus, oc: 1});
             end
          default: begin                                     // breaker opens
               int n;
               n = NA[evq[k].g];
               cmd(evq[k].g, 0, 32'd2);
               cmd(evq[k].g, 1, ~((32'd1 << (2*n)) | (32'd1 << (evq[k].bus - 1))));
               if (trip_step < 0) trip_step = s;
               if (trip2_step < 0 && s > FAULT2_STEP) trip2_step = s;
               $display("trip at board %0d bus %0d, step %0d, %0.1f ms after the fault",
                        evq[k].g, evq[k].bus, s, (s - (s > FAULT2_STEP ? FAULT2_STEP : FAULT_STEP)) * 0.02);
             end
        endcase
        evq.delete(k);
        k--;
      end
    end
    // ------------------------------------------------------------ verdict
    $display("steps=%0d waits=%0d backpressure=%0d overruns=%0d topo=%0d lte=%0d oc=%0d reports=%0d commands=%0d",
             n_steps, n_wait, n_bp, n_overrun, n_topo, n_lte, n_oc, n_report, n_cmd);
    $display("compute clocks per step: %0d %0d %0d %0d", comp[0], comp[1], comp[2], comp[3]);
    check("steps happened", n_steps > NB * (END_STEP - 10), 1);
    check("neighbour waits happened", n_wait > 0, 1);
    check("backpressure happened", n_bp > 0, 1);
    check("overrun happened", n_overrun > 0, 1);
    check("topology changes (fault, trip, reclose, fault, trip)", n_topo, 5);
    check("LTE flag happened", n_lte > 0, 1);
    check("over-current flag happened", n_oc > 0, 1);
    check("TDC report happened", n_report > 0, 1);
    check("STDC command happened", n_cmd > 0, 1);
    check("LTE flag within 2 steps of the fault", lte_fault_step >= FAULT_STEP && lte_fault_step <= FAULT_STEP + 2, 1);
    check("no flags before the fault", flags_before, 0);
    check("tripped", trip_step > 0, 1);
    check("case 1 trip delay", trip_step - FAULT_STEP >= TLN_TMU + TLN_TDC + TLN_CMD &&
                               trip_step - FAULT_STEP <= TLN_TMU + TLN_TDC + TLN_CMD + REPORT + 5, 1);
    check("tripped with the link down", trip2_step > 0, 1);
    check("case 2 trip delay", trip2_step - FAULT2_STEP >= TLN_TMU + TLN_TDC2 + TLN_CMD &&
                               trip2_step - FAULT2_STEP <= TLN_TMU + TLN_TDC2 + TLN_CMD + REPORT + 5, 1);
    check("link failure lengthens the fault", trip2_step - FAULT2_STEP > trip_step - FAULT_STEP, 1);
    check("no over-current after the trip", oc_after_trip, 0);
    check("load current cut", (r(i_shunt[FB][FBUS-1]) < 1e-3 && r(i_shunt[FB][FBUS-1]) > -1e-3), 1);
    check("voltage present", (r(v[0][0]) > 1e-3 || r(v[0][0]) < -1e-3), 1);
    check("compute time grows with matrix size", comp[2] > comp[3] && comp[3] > comp[0] && comp[0] > comp[1], 1);
    for (int g = 0; g < NB; g++) check("steps in lock-step", (step[g] + 2 >= step[0] && step[g] <= step[0] + 2), 1);
    check("no link errors", n_err, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
