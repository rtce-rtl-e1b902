// tmu_sampler: transient measurement units (TMUs) of all buses of an area,
// with the measurement block memory they fill.
//
// The sampling operation needs no packets: after the network solution of a
// step, a start pulse makes the unit visit bus 0..N-1, one per clock. For each
// bus it takes the voltage v, the load current i_shunt, the LTE estimate
// (lte_unit, which is then advanced by one step) and the threshold flags
// (abnormal_detector), and writes one record to the memory:
//   word 4b+0  V      word 4b+1  I      word 4b+2  LTE
//   word 4b+3  {valid, held lte/oc/ov, present lte/oc/ov, step[24:0]}
// Records are written every SAMPLE_DIV-th step (1: every step, the TMU rate
// equals the time-step rate); LTE and flags are evaluated every step. A flag
// raised at a bus stays in the record's held bits for FLAG_HOLD steps (by
// default one 60 Hz reporting period, 834 steps of 20 us), so a reader that
// polls at the reporting rate sees every event, however short, even though
// the present-step bits change every step. The
// processor side reads the memory passively through rd_addr / rd_data (one
// clock latency), as the DMA driver does at the 60 Hz reporting rate.
// done pulses after the last bus; abnormal holds whether any bus raised a
// flag in the last step, abn_bus which buses did and abn_kind which tests
// fired. Thresholds are written through the configuration port (target
// CFG_THRESH: 0 |V|, 1 |I|, 2 |LTE|). The record layout and the per-step
// flags are this design's choices.
module tmu_sampler
  import rtce_pkg::*;
#(
  parameter int  N          = 12,
  parameter int  SAMPLE_DIV = 1,
  parameter int  P          = 2,
  parameter fx_t C_FX       = -fx_t'(87381),
  parameter int  FLAG_HOLD  = 834,
  localparam int AW         = $clog2(N) + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [15:0]   cfg_addr,
  input  fx_t           cfg_data,
  input  logic          start,
  output logic          done,
  input  logic [31:0]   step,
  input  fx_t           v [N],
  input  fx_t           i_shunt [N],
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   rd_data,
  output logic          abnormal,
  output logic [N-1:0]  abn_bus,
  output abn_flags_t    abn_kind
);
  typedef struct packed {
    logic [31:0] stat;
    fx_t         lte;
    fx_t         i;
    fx_t         v;
  } rec_t;

  localparam fx_t FX_MAX = {1'b0, {(FX_W-1){1'b1}}};

  rec_t meas [N];
  rec_t rd_rec;
  fx_t  th_v, th_i, th_lte;
  logic busy;
  logic [$clog2(N)-1:0] b;
  logic [$clog2(SAMPLE_DIV+1)-1:0] div;
  logic  rec_en;
  logic [N-1:0] abn_acc;
  abn_flags_t   kind_acc;
  abn_flags_t   held [N];
  logic [$clog2(FLAG_HOLD+1)-1:0] hcnt [N];
  abn_flags_t   held_nx;
  fx_t        lte;
  abn_flags_t flags;

  lte_unit #(.N(N), .P(P), .C_FX(C_FX)) u_lte (
    .clk, .rst_n, .idx(b), .x(v[b]), .x_pred(v[b]), .mode_nl(1'b0),
    .upd(busy), .lte);

  abnormal_detector u_det (
    .v(v[b]), .i(i_shunt[b]), .lte, .th_v, .th_i, .th_lte, .flags);

  always_comb begin
    if (|flags)              held_nx = held[b] | flags;
    else if (int'(hcnt[b]) > 1) held_nx = held[b];
    else                     held_nx = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      th_v   <= FX_MAX;      // largest value: no flag until programmed
      th_i   <= FX_MAX;
      th_lte <= FX_MAX;
    end else if (cfg_we) begin
      case (cfg_addr)
        16'd0:   th_v   <= cfg_data;
        16'd1:   th_i   <= cfg_data;
        16'd2:   th_lte <= cfg_data;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (!rst_n) begin
      busy     <= 1'b0;
      b        <= '0;
      div      <= '0;
      rec_en   <= 1'b0;
      abnormal <= 1'b0;
      abn_bus  <= '0;
      abn_acc  <= '0;
      abn_kind <= '0;
      kind_acc <= '0;
      for (int k = 0; k < N; k++) begin
        meas[k] <= '0;
        held[k] <= '0;
        hcnt[k] <= '0;
      end
    end else if (busy) begin
      if (rec_en) meas[b] <= '{stat: {1'b1, held_nx, flags, step[24:0]},
                               lte: lte, i: i_shunt[b], v: v[b]};
      held[b] <= held_nx;
      if (|flags)              hcnt[b] <= ($bits(hcnt[b]))'(FLAG_HOLD);
      else if (hcnt[b] != '0)  hcnt[b] <= hcnt[b] - 1'b1;
      abn_acc[b] <= |flags;
      kind_acc   <= kind_acc | flags;
      b <= b + 1'b1;
      if (int'(b) == N - 1) begin
        busy     <= 1'b0;
        done     <= 1'b1;
        b        <= '0;
        abnormal <= |(abn_acc | (N'(|flags) << b));
        abn_bus  <= abn_acc | (N'(|flags) << b);
        abn_kind <= kind_acc | flags;
      end
    end else if (start) begin
      busy    <= 1'b1;
      b       <= '0;
      abn_acc <= '0;
      kind_acc <= '0;
      rec_en  <= (div == '0);
      div     <= (int'(div) == SAMPLE_DIV - 1) ? '0 : div + 1'b1;
    end
  end

  always_comb rd_rec = (int'(rd_addr[AW-1:2]) < N) ? meas[rd_addr[AW-1:2]] : '0;

  always_ff @(posedge clk) begin
    unique case (rd_addr[1:0])
      2'd0: rd_data <= rd_rec.v;
      2'd1: rd_data <= rd_rec.i;
      2'd2: rd_data <= rd_rec.lte;
      2'd3: rd_data <= rd_rec.stat;
    endcase
  end

endmodule
