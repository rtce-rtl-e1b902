// tb_emt_step_ctrl: the phase units are replaced by responders that answer
// each start pulse with done after a fixed number of clocks, and the links by
// a responder that raises rx_all a random time after send. Checked per step:
// the phases run once each and in order, steps begin every STEP_CYCLES clocks,
// step_latency equals the clocks from tick to step_done, rx_wait equals the
// clocks spent waiting for rx_all, and the step counter advances. One step is
// given a link delay longer than a whole step: it must raise overrun, count
// one overrun and the next step must start as soon as it ends.
module tb_emt_step_ctrl;
  localparam int SC = 200;
  logic clk = 0, rst_n = 0, run;
  logic tick, cmd_latch, j_load, cb_start_inj, cb_done_inj, tl_start_inj, tl_done_inj;
  logic sv_start, sv_done, cb_start_upd, cb_done_upd, tl_start_upd, tl_done_upd;
  logic send, tx_idle, rx_all, tl_start_hist, tl_done_hist, rx_ack, tmu_start, tmu_done;
  logic step_done, busy, overrun;
  logic [31:0] step;
  logic [15:0] step_latency, rx_wait, overruns;
  int checks = 0, failures = 0;

  emt_step_ctrl #(.STEP_CYCLES(SC)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // responders: done = start delayed by DL clocks
  localparam int DL [7] = '{5, 3, 9, 5, 3, 3, 4};
  logic [6:0] st, dn;
  assign st = {tmu_start, tl_start_hist, tl_start_upd, cb_start_upd, sv_start, tl_start_inj, cb_start_inj};
  assign {tmu_done, tl_done_hist, tl_done_upd, cb_done_upd, sv_done, tl_done_inj, cb_done_inj} = dn;
  int cnt [7];
  always_ff @(posedge clk) begin
    for (int p = 0; p < 7; p++) begin
      dn[p] <= 1'b0;
      if (st[p]) cnt[p] <= DL[p];
      else if (cnt[p] > 1) cnt[p] <= cnt[p] - 1;
      else if (cnt[p] == 1) begin cnt[p] <= 0; dn[p] <= 1'b1; end
    end
  end

  // phase order log
  int order [$];
  always @(posedge clk) if (rst_n) begin
    if (cmd_latch) order.push_back(0);
    if (j_load) order.push_back(1);
    for (int p = 0; p < 5; p++) if (st[p]) order.push_back(2 + p);
    if (send) order.push_back(7);
    if (st[5]) order.push_back(8);
    if (rx_ack) order.push_back(9);
    if (st[6]) order.push_back(10);
  end

  // link responder
  int link_dly, link_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) begin rx_all <= 0; link_cnt <= 0; end
    else begin
      if (send) link_cnt <= link_dly;
      else if (link_cnt > 1) link_cnt <= link_cnt - 1;
      else if (link_cnt == 1) begin link_cnt <= 0; rx_all <= 1; end
      if (rx_ack) rx_all <= 0;
    end
  end
  assign tx_idle = 1'b1;

  // measured latency and wait
  int lat, wt, tick_seen, last_tick_t, t_now;
  logic in_step, waiting;
  always @(posedge clk) begin
    t_now++;
    if (rst_n) begin
      if (in_step) lat++;
      if (waiting && !rx_all) wt++;
      if (send) waiting = 1;
      if (rx_ack) waiting = 0;
    end
  end

  initial begin
    int exp_order [11] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10};
    run = 0; t_now = 0; link_dly = 10; in_step = 0; waiting = 0;
    for (int p = 0; p < 7; p++) cnt[p] = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1; run = 1;
    for (int s = 0; s < 12; s++) begin
      int t0;
      link_dly = (s == 8) ? SC + 20 : $urandom_range(1, 40);
      if (s != 9) while (!tick) @(posedge clk);   // step 9 starts without a new tick
      t0 = t_now;
      // the restart edge of step 9 was already consumed above
      lat = (s == 9) ? 2 : 0; wt = 0; in_step = 1;
      @(posedge clk);
      while (!step_done) @(posedge clk);
      in_step = 0;
      #1;
      check($sformatf("latency of step %0d", s), step_latency, lat);
      check("rx_wait", rx_wait, wt);
      check("step count", step, s + 1);
      check($sformatf("phases of step %0d", s), order.size(), 11);
      for (int k = 0; k < 11 && k < order.size(); k++) check("order", order[k], exp_order[k]);
      order.delete();
      if (s == 8) begin
        check("overrun raised", overrun, 1);
        check("one overrun", overruns, 1);
        @(posedge clk); #1 check("late step restarts", busy, 1);
        check("restart latched", order.size(), 1);
      end else if (s < 8) check("no overrun", overrun, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
