// tb_tmu_sampler: three buses, SAMPLE_DIV = 2. Each step sets random bus
// voltages and load currents, runs one pass and reads back the measurement
// memory: on sampled steps every record must hold V, I, the LTE computed by a
// reference third difference (-1/12 scaling) and {valid, flags, step}; on the
// other steps the memory must keep the previous records. The threshold flags,
// abnormal and abn_bus are checked against the model, and a pass must take
// N+1 clocks. Flags are held for FLAG_HOLD = 3 steps in the record's held
// bits, following a reference model of the hold counter.
module tb_tmu_sampler;
  import rtce_pkg::*;
  localparam int N = 3, AW = $clog2(N) + 2;
  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [15:0] cfg_addr; fx_t cfg_data;
  logic start, done;
  logic [31:0] step;
  fx_t v [N], i_shunt [N];
  logic [AW-1:0] rd_addr; logic [31:0] rd_data;
  logic abnormal; logic [N-1:0] abn_bus; abn_flags_t abn_kind;
  int checks = 0, failures = 0, flagged = 0;

  tmu_sampler #(.N(N), .SAMPLE_DIV(2), .FLAG_HOLD(3)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask
  task automatic cfg(int a, longint d);
    cfg_we = 1; cfg_addr = 16'(a); cfg_data = fx_t'(d); @(posedge clk); #1 cfg_we = 0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    rd_addr = AW'(a); @(posedge clk); #1 d = rd_data;
  endtask

  localparam longint TH_V = 1 <<< FX_F, TH_I = 2 <<< FX_F, TH_L = 1 <<< (FX_F-4);
  longint hist [N][3];
  logic [2:0] hf [N];
  int hc [N];
  logic [31:0] mem [4*N];

  function automatic longint mag(longint a); return a < 0 ? -a : a; endfunction

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_data = 0; start = 0; step = 0; rd_addr = 0;
    for (int b = 0; b < N; b++) begin v[b] = 0; i_shunt[b] = 0; end
    for (int b = 0; b < N; b++) for (int k = 0; k < 3; k++) hist[b][k] = 0;
    for (int a = 0; a < 4*N; a++) mem[a] = 0;
    for (int b = 0; b < N; b++) begin hf[b] = 0; hc[b] = 0; end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    cfg(0, TH_V); cfg(1, TH_I); cfg(2, TH_L);
    for (int t = 0; t < 24; t++) begin
      int cyc;
      logic [N-1:0] eab;
      logic [2:0] ekind;
      step = 32'(1000 + t);
      for (int b = 0; b < N; b++) begin
        // mostly smooth values, a jump now and then
        v[b] = fx_t'(hist[b][0] + longint'($urandom_range(0, 8000)) - 4000);
        if ($urandom_range(0, 5) == 0) v[b] = v[b] + fx_t'(3 <<< (FX_F-1));
        if (v[b] > fx_t'(4 <<< FX_F)) v[b] = 0;
        i_shunt[b] = fx_t'($urandom_range(0, 5 << FX_F)) - fx_t'(5 << (FX_F-1));
      end
      start = 1; @(posedge clk); #1 start = 0;
      cyc = 1;
      while (!done) begin @(posedge clk); #1 cyc++; end
      check("pass cycles", cyc, N + 1);
      eab = '0;
      ekind = '0;
      for (int b = 0; b < N; b++) begin
        longint d, l;
        logic ov, oc, ol;
        d = longint'(v[b]) - 3*hist[b][0] + 3*hist[b][1] - hist[b][2];
        l = (t >= 3) ? ((d * -87381 + (1 <<< (FX_F-1))) >>> FX_F) : 0;
        ov = mag(longint'(v[b])) > TH_V;
        oc = mag(longint'(i_shunt[b])) > TH_I;
        ol = mag(l) > TH_L;
        eab[b] = ov | oc | ol;
        ekind = ekind | {ol, oc, ov};
        // flags held for 3 steps
        if (ov | oc | ol) begin hf[b] = hf[b] | {ol, oc, ov}; hc[b] = 3; end
        else if (hc[b] > 1) hc[b]--;
        else begin hf[b] = 0; hc[b] = 0; end
        if (t % 2 == 0) begin
          mem[4*b]   = v[b];
          mem[4*b+1] = i_shunt[b];
          mem[4*b+2] = 32'(l);
          mem[4*b+3] = {1'b1, hf[b], ol, oc, ov, step[24:0]};
        end
        hist[b][2] = hist[b][1]; hist[b][1] = hist[b][0]; hist[b][0] = longint'(v[b]);
      end
      check("abn_bus", abn_bus, eab);
      check("abnormal", abnormal, |eab);
      check("abn_kind", abn_kind, ekind);
      if (|eab) flagged++;
      for (int a = 0; a < 4*N; a++) begin
        logic [31:0] d;
        rd(a, d);
        check($sformatf("mem[%0d] step %0d", a, t), d, mem[a]);
      end
    end
    check("some steps flagged", flagged > 0, 1);
    check("some steps clean", flagged < 24, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
