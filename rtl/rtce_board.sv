// rtce_board: programmable-logic part of one co-emulation board (one power
// area), the hardware half of the per-board block design.
//
// The power area is emulated at the EMT level with a fixed time-step: the
// lumped branches are companion models (companion_bank), the lines that join
// this area to its neighbours are traveling-wave line ends (tline_end) whose
// far-end terms arrive every step over NLINK fast links (aurora_framer, one
// frame of NLPL words per link and step), and the area's nodal equation is
// solved by matrix_solver. emt_step_ctrl sequences the step. After each
// solution the TMUs (tmu_sampler) take every bus's voltage, load current and
// LTE, test them against the thresholds and write them into the measurement
// block memory, which the processor's DMA driver reads passively (meas_*).
// The processor steers the power system through the control-command block
// memory (ctrl_cmd_mem, cmd_*): topology (matrix set) and breaker mask, taken
// at the next step boundary. Everything on the other side of these ports
// (processor, TCP/IP, Ethernet MAC, DMA, Aurora cores) is outside this module.
//
// Configuration (cfg_*) loads the inverse matrices, branch table, line table
// and thresholds; see rtce_pkg::cfg_tgt_e for the address maps. Latency of a
// step, in clocks: 19 + 2*NB_BR + 3*NL + N*N + N of computation plus the time spent
// waiting for the neighbours' frames (about 2*NLPL + link latency).
// link_err is sticky: a received frame had the wrong length or order, or
// carried a step count other than the board's own (lock-step was lost).
// src_inj are the Norton current injections of the sources (generator
// models) at each bus for the present step; v and i_shunt show the solved bus
// voltages and load currents. Fixed-point format: rtce_pkg.
module rtce_board
  import rtce_pkg::*;
#(
  parameter int N           = 12,
  parameter int NB_BR       = 32,
  parameter int NLINK       = 2,
  parameter int NLPL        = 15,
  parameter int NSET        = 4,
  parameter int STEP_CYCLES = 2000,
  parameter int DLY_STEPS   = 32,
  parameter int SAMPLE_DIV  = 1,
  localparam int MAW        = $clog2(N) + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  // configuration
  input  logic          cfg_we,
  input  logic [2:0]    cfg_tgt,
  input  logic [15:0]   cfg_addr,
  input  logic [31:0]   cfg_data,
  // sources
  input  fx_t           src_inj [N],
  // control-command memory (processor side)
  input  logic          cmd_we,
  input  logic [3:0]    cmd_addr,
  input  logic [31:0]   cmd_wdata,
  output logic [31:0]   cmd_rdata,
  // measurement memory (processor side)
  input  logic [MAW-1:0] meas_addr,
  output logic [31:0]   meas_rdata,
  // fast links, AXI4-Stream user side of the Aurora cores
  output logic [63:0]   tx_tdata  [NLINK],
  output logic          tx_tvalid [NLINK],
  input  logic          tx_tready [NLINK],
  output logic          tx_tlast  [NLINK],
  input  logic [63:0]   rx_tdata  [NLINK],
  input  logic          rx_tvalid [NLINK],
  output logic          rx_tready [NLINK],
  input  logic          rx_tlast  [NLINK],
  // status
  output logic [31:0]   step,
  output logic          tick,
  output logic          step_done,
  output logic          abnormal,
  output logic [N-1:0]  abn_bus,
  output abn_flags_t    abn_kind,
  output logic          topo_changed,
  output logic          overrun,
  output logic [15:0]   overruns,
  output logic [15:0]   step_latency,
  output logic [15:0]   rx_wait,
  output logic          link_err,
  output fx_t           v [N],
  output fx_t           i_shunt [N]
);
  localparam int NL = NLINK * NLPL;

  logic cfg_ginv, cfg_br, cfg_ln, cfg_th;
  assign cfg_ginv = cfg_we && cfg_tgt == CFG_GINV;
  assign cfg_br   = cfg_we && cfg_tgt == CFG_BRANCH;
  assign cfg_ln   = cfg_we && cfg_tgt == CFG_LINE;
  assign cfg_th   = cfg_we && cfg_tgt == CFG_THRESH;

  // sequencing
  logic cmd_latch, j_load, cb_start_inj, cb_done_inj, tl_start_inj, tl_done_inj;
  logic sv_start, sv_done, sv_busy, cb_start_upd, cb_done_upd, tl_start_upd, tl_done_upd;
  logic send, tx_idle, rx_all, tl_start_hist, tl_done_hist, rx_ack, tmu_start, tmu_done;
  logic busy;

  // command
  logic [$clog2(NSET)-1:0] set_sel;
  logic [NB_BR-1:0]        br_en;

  // injection port
  logic  cb_inj_we, tl_inj_we;
  node_t cb_node_a, cb_node_b, tl_node;
  fx_t   cb_val, tl_val;

  // lines and links
  fx_t  s_out [NL];
  fx_t  s_in  [NL];
  logic [NLINK-1:0] tx_busy_l, rx_full_l, rx_err_l;
  logic [23:0]      rx_step_l [NLINK];
  logic             sync_err;

  emt_step_ctrl #(.STEP_CYCLES(STEP_CYCLES)) u_ctrl (
    .clk, .rst_n, .run, .tick, .step,
    .cmd_latch, .j_load,
    .cb_start_inj, .cb_done_inj, .tl_start_inj, .tl_done_inj,
    .sv_start, .sv_done, .cb_start_upd, .cb_done_upd, .tl_start_upd, .tl_done_upd,
    .send, .tx_idle, .rx_all, .tl_start_hist, .tl_done_hist, .rx_ack,
    .tmu_start, .tmu_done, .step_done, .busy,
    .step_latency, .rx_wait, .overrun, .overruns);

  ctrl_cmd_mem #(.NB_BR(NB_BR), .NSET(NSET)) u_cmd (
    .clk, .rst_n, .we(cmd_we), .addr(cmd_addr), .wdata(cmd_wdata), .rdata(cmd_rdata),
    .latch(cmd_latch), .set_sel, .br_en, .changed(topo_changed));

  matrix_solver #(.N(N), .NSET(NSET)) u_solver (
    .clk, .rst_n, .cfg_we(cfg_ginv), .cfg_addr, .cfg_data(fx_t'(cfg_data)), .set_sel,
    .j_load, .src(src_inj),
    .j_we(cb_inj_we || tl_inj_we),
    .j_node_a(cb_inj_we ? cb_node_a : tl_node),
    .j_node_b(cb_inj_we ? cb_node_b : node_t'(0)),
    .j_val(cb_inj_we ? cb_val : tl_val),
    .start(sv_start), .done(sv_done), .busy(sv_busy), .v);

  companion_bank #(.N(N), .NB_BR(NB_BR)) u_branches (
    .clk, .rst_n, .cfg_we(cfg_br), .cfg_addr, .cfg_data(fx_t'(cfg_data)), .br_en, .v,
    .start_inj(cb_start_inj), .done_inj(cb_done_inj),
    .inj_we(cb_inj_we), .inj_node_a(cb_node_a), .inj_node_b(cb_node_b), .inj_val(cb_val),
    .start_upd(cb_start_upd), .done_upd(cb_done_upd), .i_shunt);

  tline_end #(.N(N), .NL(NL), .DLY_STEPS(DLY_STEPS)) u_lines (
    .clk, .rst_n, .cfg_we(cfg_ln), .cfg_addr, .cfg_data(fx_t'(cfg_data)), .v,
    .start_inj(tl_start_inj), .done_inj(tl_done_inj),
    .inj_we(tl_inj_we), .inj_node(tl_node), .inj_val(tl_val),
    .start_upd(tl_start_upd), .done_upd(tl_done_upd), .s_out,
    .start_hist(tl_start_hist), .done_hist(tl_done_hist), .s_in);

  tmu_sampler #(.N(N), .SAMPLE_DIV(SAMPLE_DIV)) u_tmu (
    .clk, .rst_n, .cfg_we(cfg_th), .cfg_addr, .cfg_data(fx_t'(cfg_data)),
    .start(tmu_start), .done(tmu_done), .step, .v, .i_shunt,
    .rd_addr(meas_addr), .rd_data(meas_rdata), .abnormal, .abn_bus, .abn_kind);

  for (genvar l = 0; l < NLINK; l++) begin : g_link
    fx_t tx_d [NLPL];
    fx_t rx_d [NLPL];
    for (genvar k = 0; k < NLPL; k++) begin : g_w
      assign tx_d[k]           = s_out[l*NLPL + k];
      assign s_in[l*NLPL + k]  = rx_d[k];
    end
    aurora_framer #(.NLPL(NLPL)) u_link (
      .clk, .rst_n, .step(step[23:0]),
      .send, .tx_data(tx_d), .tx_busy(tx_busy_l[l]),
      .tx_tdata(tx_tdata[l]), .tx_tvalid(tx_tvalid[l]), .tx_tready(tx_tready[l]), .tx_tlast(tx_tlast[l]),
      .rx_tdata(rx_tdata[l]), .rx_tvalid(rx_tvalid[l]), .rx_tready(rx_tready[l]), .rx_tlast(rx_tlast[l]),
      .rx_full(rx_full_l[l]), .rx_data(rx_d), .rx_step(rx_step_l[l]), .rx_ack, .rx_err(rx_err_l[l]));
  end

  assign tx_idle  = ~|tx_busy_l;
  assign rx_all   = &rx_full_l;
  // a consumed frame must carry this board's own step count: the boards run in
  // lock-step, so any other count means a frame was lost or repeated
  always_ff @(posedge clk)
    if (!rst_n) sync_err <= 1'b0;
    else if (rx_ack)
      for (int l = 0; l < NLINK; l++) if (rx_step_l[l] != step[23:0]) sync_err <= 1'b1;

  assign link_err = |rx_err_l || sync_err;

  // the solver and the links are only active inside a step of the sequencer
  assert property (@(posedge clk) disable iff (!rst_n) sv_busy |-> busy);
  assert property (@(posedge clk) disable iff (!rst_n) send |-> busy);

endmodule
