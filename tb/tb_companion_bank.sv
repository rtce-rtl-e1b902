// tb_companion_bank: four branches on two buses (L bus1-ground, C bus2-ground,
// R bus1-bus2, L bus1-bus2) driven with random voltages for many steps. A
// reference model applies the trapezoidal companion equations; the injection
// stream (nodes and history values), the per-bus load currents and the effect
// of opening a breaker (branch disabled: no current, history cleared) are
// compared every step. Each phase must take NB_BR+1 clocks.
module tb_companion_bank;
  import rtce_pkg::*;
  localparam int N = 2, NB_BR = 4;
  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [15:0] cfg_addr; fx_t cfg_data;
  logic [NB_BR-1:0] br_en;
  fx_t v [N];
  logic start_inj, done_inj, inj_we, start_upd, done_upd;
  node_t inj_node_a, inj_node_b; fx_t inj_val;
  fx_t i_shunt [N];
  int checks = 0, failures = 0;

  companion_bank #(.N(N), .NB_BR(NB_BR)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int        na [NB_BR] = '{1, 2, 1, 1};
  int        nb [NB_BR] = '{0, 0, 2, 2};
  br_kind_e  kd [NB_BR] = '{BR_L, BR_C, BR_R, BR_L};
  longint    gq [NB_BR];
  longint    ih [NB_BR];
  longint    seen [NB_BR];

  function automatic longint mul(longint a, longint b);
    return (a * b + (1 <<< (FX_F-1))) >>> FX_F;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic cfg(int a, longint d);
    cfg_we = 1; cfg_addr = 16'(a); cfg_data = fx_t'(d); @(posedge clk); #1 cfg_we = 0;
  endtask

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_data = 0; br_en = '1; start_inj = 0; start_upd = 0;
    v[0] = 0; v[1] = 0;
    gq = '{longint'(0.05 * 2.0**FX_F), longint'(2.5 * 2.0**FX_F), longint'(0.8 * 2.0**FX_F),
           longint'(0.02 * 2.0**FX_F)};
    for (int b = 0; b < NB_BR; b++) ih[b] = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int b = 0; b < NB_BR; b++) begin
      cfg(b*4 + 0, na[b]); cfg(b*4 + 1, nb[b]); cfg(b*4 + 2, longint'(kd[b])); cfg(b*4 + 3, gq[b]);
    end
    for (int t = 0; t < 30; t++) begin
      int cyc;
      longint ish [N];
      if (t == 20) br_en = 4'b0111;                 // open branch 3
      // inject phase
      for (int b = 0; b < NB_BR; b++) seen[b] = 0;
      start_inj = 1; @(posedge clk); #1 start_inj = 0;
      cyc = 1;
      while (1) begin
        if (inj_we) begin
          int bi;
          bi = -1;
          for (int b = 0; b < NB_BR; b++)
            if (na[b] == int'(inj_node_a) && nb[b] == int'(inj_node_b) && ih[b] == longint'(inj_val) && seen[b] == 0)
              bi = b;
          checks++;
          if (bi < 0) begin failures++; $display("FAIL unexpected injection %0d %0d %0d", inj_node_a, inj_node_b, inj_val); end
          else seen[bi] = 1;
        end
        if (done_inj) break;
        @(posedge clk); #1 cyc++;
      end
      check("inj cycles", cyc, NB_BR + 1);
      for (int b = 0; b < NB_BR; b++)
        if (br_en[b] && ih[b] != 0) check("injection missing", seen[b], 1);
      // new voltages and update phase
      v[0] = fx_t'($urandom_range(0, 2 << FX_F)) - fx_t'(1 << FX_F);
      v[1] = fx_t'($urandom_range(0, 2 << FX_F)) - fx_t'(1 << FX_F);
      ish[0] = 0; ish[1] = 0;
      for (int b = 0; b < NB_BR; b++) begin
        longint va, vb, gv, i;
        va = (na[b] == 0) ? 0 : longint'(v[na[b]-1]);
        vb = (nb[b] == 0) ? 0 : longint'(v[nb[b]-1]);
        gv = mul(gq[b], va - vb);
        i  = br_en[b] ? gv + ih[b] : 0;
        if (!br_en[b])      ih[b] = 0;
        else if (kd[b] == BR_L) ih[b] = i + gv;
        else if (kd[b] == BR_C) ih[b] = -(i + gv);
        else ih[b] = 0;
        if (nb[b] == 0) ish[na[b]-1] += i;
      end
      start_upd = 1; @(posedge clk); #1 start_upd = 0;
      cyc = 1;
      while (!done_upd) begin @(posedge clk); #1 cyc++; end
      check("upd cycles", cyc, NB_BR + 1);
      check("i_shunt bus1", i_shunt[0], ish[0]);
      check("i_shunt bus2", i_shunt[1], ish[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
