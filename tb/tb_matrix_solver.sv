// tb_matrix_solver: loads two random 3x3 inverse matrices, builds J from the
// source copy plus random (node_a, node_b, value) injections, including
// ground and same-node cases, solves with each matrix set and compares v with
// a 64-bit reference product. The solve must take N*N+1 clocks from start to
// done.
module tb_matrix_solver;
  import rtce_pkg::*;
  localparam int N = 3, NSET = 2;
  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [15:0] cfg_addr; fx_t cfg_data;
  logic [0:0] set_sel;
  logic j_load, j_we, start, done, busy;
  fx_t src [N];
  node_t j_node_a, j_node_b; fx_t j_val;
  fx_t v [N];
  int checks = 0, failures = 0;

  matrix_solver #(.N(N), .NSET(NSET)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint g [NSET][N][N];
  longint jr [N];

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_data = 0; set_sel = 0; j_load = 0; j_we = 0; start = 0;
    j_node_a = 0; j_node_b = 0; j_val = 0;
    for (int k = 0; k < N; k++) src[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < NSET; s++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          g[s][r][c] = longint'($urandom_range(0, 4 << FX_F)) - longint'(2 << FX_F);
          cfg_we = 1; cfg_addr = 16'((s*N + r)*N + c); cfg_data = fx_t'(g[s][r][c]);
          @(posedge clk); #1;
        end
    cfg_we = 0;
    for (int t = 0; t < 12; t++) begin
      int cyc;
      for (int k = 0; k < N; k++) begin
        src[k] = fx_t'($urandom_range(0, 2 << FX_F)) - fx_t'(1 << FX_F);
        jr[k]  = longint'(src[k]);
      end
      j_load = 1; @(posedge clk); #1 j_load = 0;
      for (int q = 0; q < 6; q++) begin
        j_node_a = node_t'($urandom_range(0, N));
        j_node_b = (q == 5) ? j_node_a : node_t'($urandom_range(0, N));
        j_val    = fx_t'($urandom_range(0, 1 << FX_F)) - fx_t'(1 << (FX_F-1));
        if (j_node_a != j_node_b) begin
          if (j_node_a != 0) jr[j_node_a-1] -= longint'(j_val);
          if (j_node_b != 0) jr[j_node_b-1] += longint'(j_val);
        end
        j_we = 1; @(posedge clk); #1 j_we = 0;
      end
      set_sel = 1'(t % 2);
      start = 1; @(posedge clk); #1 start = 0;
      cyc = 1;
      while (!done) begin @(posedge clk); #1 cyc++; end
      checks++;
      if (cyc != N*N + 1) begin
        failures++; $display("FAIL latency %0d", cyc);
      end
      for (int r = 0; r < N; r++) begin
        longint acc;
        acc = 0;
        for (int c = 0; c < N; c++) acc += g[t%2][r][c] * jr[c];
        acc = (acc + (1 <<< (FX_F-1))) >>> FX_F;
        checks++;
        if (longint'(v[r]) != acc) begin
          failures++; $display("FAIL t=%0d v[%0d]=%0d exp %0d", t, r, v[r], acc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
