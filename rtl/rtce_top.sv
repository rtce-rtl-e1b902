// rtce_top: the multi-board real-time co-emulator, one rtce_board per power
// area, side by side.
//
// The test grid is split into NB areas, each emulated by its own board with
// the same time-step; the areas are joined by transmission lines whose ends
// exchange traveling-wave terms every step over fast point-to-point links.
// Board g drives its link 0 towards board g+1 and its link 1 towards board g-1
// (a ring), so line end k of link 0 on board g and line end k of link 1 on
// board g+1 are the two ends of one line. The serial link itself (Aurora core,
// transceiver, fibre) is not part of this RTL: every board's AXI4-Stream link
// ports are brought out as ax_tx_* / ax_rx_* [board][link] and the ring is
// closed outside. Likewise the processor side of each board (configuration,
// control-command memory, measurement memory) and the source injections are
// brought out per board.
//
// Board g has N_AREA[g] buses (the sizes of the areas' network matrices);
// arrays sized NMAX use entries 0..N_AREA[g]-1. All boards share clk, rst_n
// and run, so their step timers stay aligned; a board that is ahead simply
// waits for its neighbours' frames.
module rtce_top
  import rtce_pkg::*;
#(
  parameter int NB            = 4,
  parameter int N_AREA [NB]   = '{6, 3, 12, 9},
  parameter int NMAX          = 12,
  parameter int NB_BR         = 32,
  parameter int NLPL          = 15,
  parameter int NSET          = 4,
  parameter int STEP_CYCLES   = 2000,
  parameter int DLY_STEPS     = 32,
  parameter int SAMPLE_DIV    = 1,
  localparam int NLINK        = 2,
  localparam int MAW          = $clog2(NMAX) + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  // per-board configuration
  input  logic          cfg_we   [NB],
  input  logic [2:0]    cfg_tgt  [NB],
  input  logic [15:0]   cfg_addr [NB],
  input  logic [31:0]   cfg_data [NB],
  // per-board source injections
  input  fx_t           src_inj  [NB][NMAX],
  // per-board control-command memory
  input  logic          cmd_we    [NB],
  input  logic [3:0]    cmd_addr  [NB],
  input  logic [31:0]   cmd_wdata [NB],
  output logic [31:0]   cmd_rdata [NB],
  // per-board measurement memory
  input  logic [MAW-1:0] meas_addr  [NB],
  output logic [31:0]   meas_rdata [NB],
  // fast links [board][link]
  output logic [63:0]   ax_tx_tdata  [NB][NLINK],
  output logic          ax_tx_tvalid [NB][NLINK],
  input  logic          ax_tx_tready [NB][NLINK],
  output logic          ax_tx_tlast  [NB][NLINK],
  input  logic [63:0]   ax_rx_tdata  [NB][NLINK],
  input  logic          ax_rx_tvalid [NB][NLINK],
  output logic          ax_rx_tready [NB][NLINK],
  input  logic          ax_rx_tlast  [NB][NLINK],
  // per-board status
  output logic [31:0]   step         [NB],
  output logic          tick         [NB],
  output logic          step_done    [NB],
  output logic          abnormal     [NB],
  output logic [NMAX-1:0] abn_bus    [NB],
  output abn_flags_t    abn_kind     [NB],
  output logic          topo_changed [NB],
  output logic          overrun      [NB],
  output logic [15:0]   overruns     [NB],
  output logic [15:0]   step_latency [NB],
  output logic [15:0]   rx_wait      [NB],
  output logic          link_err     [NB],
  output fx_t           v            [NB][NMAX],
  output fx_t           i_shunt      [NB][NMAX]
);

  for (genvar g = 0; g < NB; g++) begin : g_board
    localparam int N  = N_AREA[g];
    localparam int AW = $clog2(N) + 2;
    fx_t          src_b [N];
    fx_t          v_b   [N];
    fx_t          i_b   [N];
    logic [N-1:0] abn_b;

    for (genvar k = 0; k < NMAX; k++) begin : g_bus
      if (k < N) begin : g_used
        assign src_b[k]      = src_inj[g][k];
        assign v[g][k]       = v_b[k];
        assign i_shunt[g][k] = i_b[k];
        assign abn_bus[g][k] = abn_b[k];
      end else begin : g_unused
        assign v[g][k]       = '0;
        assign i_shunt[g][k] = '0;
        assign abn_bus[g][k] = 1'b0;
      end
    end

    rtce_board #(
      .N(N), .NB_BR(NB_BR), .NLINK(NLINK), .NLPL(NLPL), .NSET(NSET),
      .STEP_CYCLES(STEP_CYCLES), .DLY_STEPS(DLY_STEPS), .SAMPLE_DIV(SAMPLE_DIV)
    ) u_board (
      .clk, .rst_n, .run,
      .cfg_we(cfg_we[g]), .cfg_tgt(cfg_tgt[g]), .cfg_addr(cfg_addr[g]), .cfg_data(cfg_data[g]),
      .src_inj(src_b),
      .cmd_we(cmd_we[g]), .cmd_addr(cmd_addr[g]), .cmd_wdata(cmd_wdata[g]), .cmd_rdata(cmd_rdata[g]),
      .meas_addr(meas_addr[g][AW-1:0]), .meas_rdata(meas_rdata[g]),
      .tx_tdata(ax_tx_tdata[g]), .tx_tvalid(ax_tx_tvalid[g]), .tx_tready(ax_tx_tready[g]),
      .tx_tlast(ax_tx_tlast[g]),
      .rx_tdata(ax_rx_tdata[g]), .rx_tvalid(ax_rx_tvalid[g]), .rx_tready(ax_rx_tready[g]),
      .rx_tlast(ax_rx_tlast[g]),
      .step(step[g]), .tick(tick[g]), .step_done(step_done[g]), .abnormal(abnormal[g]),
      .abn_bus(abn_b), .abn_kind(abn_kind[g]), .topo_changed(topo_changed[g]), .overrun(overrun[g]),
      .overruns(overruns[g]), .step_latency(step_latency[g]), .rx_wait(rx_wait[g]),
      .link_err(link_err[g]), .v(v_b), .i_shunt(i_b));
  end

endmodule
