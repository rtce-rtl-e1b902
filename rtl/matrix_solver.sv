// matrix_solver: nodal solution G v = J of one power area.
//
// The area's conductance matrix is constant between topology changes, so the
// processor loads its inverse once per topology; NSET inverses are held and
// set_sel (from the control-command memory) picks the one in force. During a
// step the injection vector J is built through the accumulate port: j_load
// copies the source injections, then each j_we adds -j_val to bus j_node_a
// and +j_val to bus j_node_b (node 0 is ground and is ignored). A start pulse
// then multiplies the chosen inverse by J with one multiply-accumulate per
// clock, row by row, and writes v; done pulses after N*N+1 clocks.
// Storing inverses and using a single MAC are this design's choices: the
// reference design only states that a matrix equation is solved each step,
// with at most 12 x 12 per area.
module matrix_solver
  import rtce_pkg::*;
#(
  parameter int N    = 12,
  parameter int NSET = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration: inverse matrices, addr = set*N*N + r*N + c
  input  logic        cfg_we,
  input  logic [15:0] cfg_addr,
  input  fx_t         cfg_data,
  input  logic [$clog2(NSET)-1:0] set_sel,
  // injection vector
  input  logic        j_load,
  input  fx_t         src [N],
  input  logic        j_we,
  input  node_t       j_node_a,
  input  node_t       j_node_b,
  input  fx_t         j_val,
  // solution
  input  logic        start,
  output logic        done,
  output logic        busy,
  output fx_t         v [N]
);
  localparam int MW = 2*FX_W + $clog2(N) + 1;
  typedef logic signed [MW-1:0] macc_t;

  fx_t   ginv [NSET*N*N];
  fx_t   jvec [N];
  logic [$clog2(N)-1:0] r, c;
  macc_t acc;
  macc_t sum;
  logic [$clog2(NSET*N*N)-1:0] base;

  always_ff @(posedge clk)
    if (cfg_we && int'(cfg_addr) < NSET*N*N) ginv[$bits(base)'(cfg_addr)] <= cfg_data;

  always_comb begin
    base = $bits(base)'((int'(set_sel) * N + int'(r)) * N + int'(c));
    sum  = acc + macc_t'(ginv[base]) * macc_t'(jvec[c]);
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (!rst_n) begin
      busy <= 1'b0;
      r    <= '0;
      c    <= '0;
      acc  <= '0;
      for (int k = 0; k < N; k++) begin
        jvec[k] <= '0;
        v[k]    <= '0;
      end
    end else if (busy) begin
      if (int'(c) == N - 1) begin
        v[r] <= fx_t'((sum + macc_t'(1 <<< (FX_F-1))) >>> FX_F);
        acc  <= '0;
        c    <= '0;
        if (int'(r) == N - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          r    <= '0;
        end else begin
          r <= r + 1'b1;
        end
      end else begin
        acc <= sum;
        c   <= c + 1'b1;
      end
    end else if (start) begin
      busy <= 1'b1;
      r    <= '0;
      c    <= '0;
      acc  <= '0;
    end else if (j_load) begin
      for (int k = 0; k < N; k++) jvec[k] <= src[k];
    end else if (j_we) begin
      for (int k = 0; k < N; k++) begin
        if (int'(j_node_a) == k + 1 && int'(j_node_b) == k + 1) jvec[k] <= jvec[k];
        else if (int'(j_node_a) == k + 1) jvec[k] <= jvec[k] - j_val;
        else if (int'(j_node_b) == k + 1) jvec[k] <= jvec[k] + j_val;
      end
    end
  end

  // a new solve or injection must not arrive while the product is running
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !(start || j_load || j_we));

endmodule
