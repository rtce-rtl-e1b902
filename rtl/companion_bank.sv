// companion_bank: equivalent-circuit update of the lumped R, L and C branches.
//
// Each branch between bus node_a and bus node_b (0 = ground) is replaced, by
// the trapezoidal rule, with a conductance geq in parallel with a history
// current ih: i(n) = geq*(va-vb) + ih(n-1). The history for the next step is
//   L:  ih(n) =   i(n) + geq*(va-vb)        (geq = dt / 2L)
//   C:  ih(n) = -(i(n) + geq*(va-vb))       (geq = 2C / dt)
//   R:  ih(n) = 0                           (geq = 1/R)
// The conductances themselves live in the solver's matrix. Two phases, each
// one branch per clock:
//   inject (start_inj): streams (node_a, node_b, ih) to the solver's
//     accumulate port, ending with done_inj;
//   update (start_upd): reads the solved voltages v, computes i and the new
//     ih of every branch and sums the current of each branch that goes to
//     ground into i_shunt of its bus (the bus load current); done_upd ends it.
// A branch whose br_en bit is 0 (open breaker) carries no current and keeps no
// history. The branch table is written through the configuration port,
// addr = b*4 + {0: node_a, 1: node_b, 2: kind, 3: geq}. Integration rule and
// the R/L/C element set are this design's reading of the reference design.
module companion_bank
  import rtce_pkg::*;
#(
  parameter int N     = 12,
  parameter int NB_BR = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_we,
  input  logic [15:0]     cfg_addr,
  input  fx_t             cfg_data,
  input  logic [NB_BR-1:0] br_en,
  input  fx_t             v [N],
  input  logic            start_inj,
  output logic            done_inj,
  output logic            inj_we,
  output node_t           inj_node_a,
  output node_t           inj_node_b,
  output fx_t             inj_val,
  input  logic            start_upd,
  output logic            done_upd,
  output fx_t             i_shunt [N]
);
  typedef enum logic [1:0] {S_IDLE, S_INJ, S_UPD} state_e;

  node_t    node_a [NB_BR];
  node_t    node_b [NB_BR];
  br_kind_e kind   [NB_BR];
  fx_t      geq    [NB_BR];
  fx_t      ih     [NB_BR];

  state_e state;
  logic [$clog2(NB_BR)-1:0] b;
  localparam int NW = N > 1 ? $clog2(N) : 1;
  logic [$clog2(NB_BR)-1:0] cb;                    // branch addressed by cfg

  // array index of bus n (1..N)
  function automatic logic [NW-1:0] bus(node_t n);
    return NW'(n - 1'b1);
  endfunction

  assign cb = cfg_addr[$clog2(NB_BR)+1:2];

  fx_t va, vb, vab, gv, ibr, ih_new;

  always_ff @(posedge clk) begin
    if (cfg_we && int'(cfg_addr[15:2]) < NB_BR) begin
      unique case (cfg_addr[1:0])
        2'd0: node_a[cb] <= node_t'(cfg_data);
        2'd1: node_b[cb] <= node_t'(cfg_data);
        2'd2: kind[cb]   <= br_kind_e'(cfg_data[1:0]);
        2'd3: geq[cb]    <= cfg_data;
      endcase
    end
  end

  always_comb begin
    va  = (node_a[b] == '0 || int'(node_a[b]) > N) ? '0 : v[bus(node_a[b])];
    vb  = (node_b[b] == '0 || int'(node_b[b]) > N) ? '0 : v[bus(node_b[b])];
    vab = va - vb;
    gv  = fx_mul(geq[b], vab);
    ibr = br_en[b] ? gv + ih[b] : '0;
    unique case (kind[b])
      BR_L:    ih_new = ibr + gv;
      BR_C:    ih_new = -(ibr + gv);
      default: ih_new = '0;
    endcase
    if (!br_en[b]) ih_new = '0;
  end

  always_ff @(posedge clk) begin
    done_inj <= 1'b0;
    done_upd <= 1'b0;
    inj_we   <= 1'b0;
    if (!rst_n) begin
      state      <= S_IDLE;
      b          <= '0;
      inj_node_a <= '0;
      inj_node_b <= '0;
      inj_val    <= '0;
      for (int k = 0; k < NB_BR; k++) ih[k] <= '0;
      for (int k = 0; k < N; k++) i_shunt[k] <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          b <= '0;
          if (start_inj) state <= S_INJ;
          else if (start_upd) begin
            state <= S_UPD;
            for (int k = 0; k < N; k++) i_shunt[k] <= '0;
          end
        end
        S_INJ: begin
          inj_we     <= br_en[b] && ih[b] != '0;
          inj_node_a <= node_a[b];
          inj_node_b <= node_b[b];
          inj_val    <= ih[b];
          b          <= b + 1'b1;
          if (int'(b) == NB_BR - 1) begin
            state    <= S_IDLE;
            done_inj <= 1'b1;
          end
        end
        S_UPD: begin
          ih[b] <= ih_new;
          if (node_b[b] == '0 && node_a[b] != '0 && int'(node_a[b]) <= N)
            i_shunt[bus(node_a[b])] <= i_shunt[bus(node_a[b])] + ibr;
          else if (node_a[b] == '0 && node_b[b] != '0 && int'(node_b[b]) <= N)
            i_shunt[bus(node_b[b])] <= i_shunt[bus(node_b[b])] - ibr;
          b <= b + 1'b1;
          if (int'(b) == NB_BR - 1) begin
            state    <= S_IDLE;
            done_upd <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
