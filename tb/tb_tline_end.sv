// tb_tline_end: three line ends (on bus 1, bus 2 and an unused one) with a
// travel time of 3 steps. Every step it checks the injection stream against
// the model's history currents, s_out = (2/Z) v + I against the model, feeds
// random far-end terms and checks that each history current becomes minus the
// term received DLY_STEPS-1 steps earlier (zero during the first steps).
module tb_tline_end;
  import rtce_pkg::*;
  localparam int N = 2, NL = 3, D = 3;
  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [15:0] cfg_addr; fx_t cfg_data;
  fx_t v [N];
  logic start_inj, done_inj, inj_we, start_upd, done_upd, start_hist, done_hist;
  node_t inj_node; fx_t inj_val;
  fx_t s_out [NL], s_in [NL];
  int checks = 0, failures = 0;

  tline_end #(.N(N), .NL(NL), .DLY_STEPS(D)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int     nd [NL] = '{1, 2, 0};
  longint yz [NL];
  longint ik [NL];
  longint rxq [NL][$];

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
  task automatic run(output int cyc, input int which);
    if (which == 0) start_inj = 1; else if (which == 1) start_upd = 1; else start_hist = 1;
    @(posedge clk); #1 start_inj = 0; start_upd = 0; start_hist = 0;
    cyc = 1;
    while (!(which == 0 ? done_inj : which == 1 ? done_upd : done_hist)) begin
      if (which == 0 && inj_we) begin
        int e;
        e = -1;
        for (int k = 0; k < NL; k++) if (nd[k] == int'(inj_node) && ik[k] == longint'(inj_val)) e = k;
        checks++;
        if (e < 0) begin failures++; $display("FAIL injection %0d %0d", inj_node, inj_val); end
      end
      @(posedge clk); #1 cyc++;
    end
  endtask

  initial begin
    int cyc;
    cfg_we = 0; cfg_addr = 0; cfg_data = 0; start_inj = 0; start_upd = 0; start_hist = 0;
    v[0] = 0; v[1] = 0;
    for (int k = 0; k < NL; k++) begin s_in[k] = 0; ik[k] = 0; end
    yz = '{longint'(0.004 * 2.0**FX_F), longint'(0.0025 * 2.0**FX_F), longint'(0.01 * 2.0**FX_F)};
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < NL; k++) begin cfg(2*k, nd[k]); cfg(2*k + 1, yz[k]); end
    for (int t = 0; t < 25; t++) begin
      run(cyc, 0);
      check("inj cycles", cyc, NL + 1);
      v[0] = fx_t'($urandom_range(0, 2 << FX_F)) - fx_t'(1 << FX_F);
      v[1] = fx_t'($urandom_range(0, 2 << FX_F)) - fx_t'(1 << FX_F);
      run(cyc, 1);
      for (int k = 0; k < NL; k++) begin
        longint vk;
        vk = nd[k] == 0 ? 0 : longint'(v[nd[k]-1]);
        check("s_out", s_out[k], mul(2*yz[k], vk) + ik[k]);
      end
      for (int k = 0; k < NL; k++) begin
        s_in[k] = fx_t'($urandom_range(0, 2 << FX_F)) - fx_t'(1 << FX_F);
        rxq[k].push_back(longint'(s_in[k]));
      end
      run(cyc, 2);
      check("hist cycles", cyc, NL + 1);
      // history of step t+1 is the term received at step t+1-D
      for (int k = 0; k < NL; k++) begin
        if (t + 1 - D >= 0) ik[k] = -rxq[k][t + 1 - D];
        else ik[k] = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
