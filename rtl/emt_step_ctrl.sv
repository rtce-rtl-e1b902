// emt_step_ctrl: time-step sequencer of one board's EMT emulation.
//
// A timer raises tick every STEP_CYCLES clocks (2000 = 20 us at 100 MHz, the
// time-step used on all boards). Each tick runs one step as a chain of
// phases; every phase is started with a one-clock start pulse and ends with
// the unit's done pulse:
//   LATCH   take the control command in force for this step
//   LOAD    copy the source injections into the solver's J
//   CB_INJ  branch history currents into J        (companion_bank)
//   TL_INJ  line history currents into J          (tline_end)
//   SOLVE   v = G^-1 J                            (matrix_solver)
//   CB_UPD  branch currents and new histories     (companion_bank)
//   TL_UPD  outgoing line terms                   (tline_end)
//   SEND    send one frame on every link
//   WAIT_RX stall until every link has delivered the neighbour's frame
//   HIST    line histories of the next step       (tline_end), frames consumed
//   TMU     LTE, threshold flags, measurement records (tmu_sampler)
// step_latency is the number of clocks from tick to the end of the step, the
// figure that bounds the smallest real-time step, and rx_wait the clocks spent
// stalled in WAIT_RX. A tick that arrives while a step is still running sets
// the sticky overrun flag, is counted in overruns and starts the next step as
// soon as the late one ends. The phases follow the reference design's split
// of a step; the order and the overrun rule are this design's.
module emt_step_ctrl #(
  parameter int STEP_CYCLES = 2000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  output logic        tick,
  output logic [31:0] step,
  output logic        cmd_latch,
  output logic        j_load,
  output logic        cb_start_inj,
  input  logic        cb_done_inj,
  output logic        tl_start_inj,
  input  logic        tl_done_inj,
  output logic        sv_start,
  input  logic        sv_done,
  output logic        cb_start_upd,
  input  logic        cb_done_upd,
  output logic        tl_start_upd,
  input  logic        tl_done_upd,
  output logic        send,
  input  logic        tx_idle,
  input  logic        rx_all,
  output logic        tl_start_hist,
  input  logic        tl_done_hist,
  output logic        rx_ack,
  output logic        tmu_start,
  input  logic        tmu_done,
  output logic        step_done,
  output logic        busy,
  output logic [15:0] step_latency,
  output logic [15:0] rx_wait,
  output logic        overrun,
  output logic [15:0] overruns
);
  typedef enum logic [3:0] {
    S_IDLE, S_LATCH, S_LOAD, S_CB_INJ, S_TL_INJ, S_SOLVE, S_CB_UPD, S_TL_UPD,
    S_SEND, S_WAIT_RX, S_HIST, S_TMU
  } state_e;

  state_e state;
  logic   started;
  logic   pend;
  logic [$clog2(STEP_CYCLES)-1:0] timer;
  logic [15:0] lat_cnt, wait_cnt;
  logic   go;      // start pulse of the present phase

  assign tick = run && (int'(timer) == STEP_CYCLES - 1);
  assign busy = state != S_IDLE;
  assign go   = !started;

  always_comb begin
    cmd_latch     = state == S_LATCH;
    j_load        = state == S_LOAD;
    cb_start_inj  = state == S_CB_INJ  && go;
    tl_start_inj  = state == S_TL_INJ  && go;
    sv_start      = state == S_SOLVE   && go;
    cb_start_upd  = state == S_CB_UPD  && go;
    tl_start_upd  = state == S_TL_UPD  && go;
    send          = state == S_SEND && tx_idle;
    tl_start_hist = state == S_HIST    && go;
    rx_ack        = state == S_HIST    && tl_done_hist;
    tmu_start     = state == S_TMU     && go;
  end

  always_ff @(posedge clk) begin
    step_done <= 1'b0;
    if (!rst_n) begin
      state        <= S_IDLE;
      started      <= 1'b0;
      pend         <= 1'b0;
      timer        <= '0;
      step         <= '0;
      lat_cnt      <= '0;
      wait_cnt     <= '0;
      step_latency <= '0;
      rx_wait      <= '0;
      overrun      <= 1'b0;
      overruns     <= '0;
    end else begin
      if (run) timer <= tick ? '0 : timer + 1'b1;
      if (busy) lat_cnt <= lat_cnt + 1'b1;
      if (tick && (busy || pend)) begin
        overrun  <= 1'b1;
        overruns <= overruns + 1'b1;
      end
      if (tick && busy) pend <= 1'b1;

      unique case (state)
        S_IDLE: begin
          started <= 1'b0;
          if (tick || pend) begin
            state    <= S_LATCH;
            pend     <= 1'b0;
            lat_cnt  <= 16'd1;
            wait_cnt <= '0;
          end
        end
        S_LATCH: state <= S_LOAD;
        S_LOAD:  state <= S_CB_INJ;
        S_CB_INJ, S_TL_INJ, S_SOLVE, S_CB_UPD, S_TL_UPD, S_HIST, S_TMU: begin
          started <= 1'b1;
          if ((state == S_CB_INJ && cb_done_inj) || (state == S_TL_INJ && tl_done_inj) ||
              (state == S_SOLVE  && sv_done)     || (state == S_CB_UPD && cb_done_upd) ||
              (state == S_TL_UPD && tl_done_upd) || (state == S_HIST   && tl_done_hist) ||
              (state == S_TMU    && tmu_done)) begin
            started <= 1'b0;
            unique case (state)
              S_CB_INJ: state <= S_TL_INJ;
              S_TL_INJ: state <= S_SOLVE;
              S_SOLVE:  state <= S_CB_UPD;
              S_CB_UPD: state <= S_TL_UPD;
              S_TL_UPD: state <= S_SEND;
              S_HIST:   state <= S_TMU;
              default: begin                     // S_TMU: step finished
                state        <= S_IDLE;
                step         <= step + 1'b1;
                step_latency <= lat_cnt + 1'b1;
                rx_wait      <= wait_cnt;
                step_done    <= 1'b1;
              end
            endcase
          end
        end
        S_SEND:    if (tx_idle) state <= S_WAIT_RX;
        S_WAIT_RX: begin
          if (rx_all) state <= S_HIST;
          else        wait_cnt <= wait_cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
