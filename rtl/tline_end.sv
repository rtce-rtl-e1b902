// tline_end: traveling-wave (lossless Bergeron) ends of the lines that leave
// this area for a neighbouring board.
//
// A line of surge impedance Z and travel time tau = DLY_STEPS*dt is seen from
// bus k as a conductance 1/Z (part of the solver's matrix) in parallel with a
// history current Ik. With the far end m on another board,
//   Ik(n+1) = -[ (2/Z) vm + Im ](n+1-DLY_STEPS)
// so each board sends, every step, s(n) = (2/Z) v(n) + I(n) of its own end and
// keeps the received far-end terms for DLY_STEPS steps. This decoupling over
// the travel time is what lets the areas run on separate boards in parallel.
// Phases, one line end per clock:
//   inject (start_inj): streams (node, 0, Ik) to the solver (current leaves
//     the bus into the line);
//   update (start_upd): forms s_out of every end from the solved voltages;
//   history (start_hist): stores the received s_in in the delay memory and
//     takes the history current of the next step from it.
// Until DLY_STEPS terms have arrived the history current is zero. The line
// table is written through the configuration port, addr = e*2 + {0: bus,
// 1: 1/Z}. The reference design names the traveling-wave model; the lossless
// form and the common whole-step delay are this design's choices.
module tline_end
  import rtce_pkg::*;
#(
  parameter int N         = 12,
  parameter int NL        = 30,
  parameter int DLY_STEPS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [15:0] cfg_addr,
  input  fx_t         cfg_data,
  input  fx_t         v [N],
  input  logic        start_inj,
  output logic        done_inj,
  output logic        inj_we,
  output node_t       inj_node,
  output fx_t         inj_val,
  input  logic        start_upd,
  output logic        done_upd,
  output fx_t         s_out [NL],
  input  logic        start_hist,
  output logic        done_hist,
  input  fx_t         s_in [NL]
);
  localparam int PW = (DLY_STEPS > 1) ? $clog2(DLY_STEPS) : 1;
  typedef enum logic [1:0] {S_IDLE, S_INJ, S_UPD, S_HIST} state_e;

  node_t lnode [NL];
  fx_t   yz    [NL];
  fx_t   ik    [NL];
  fx_t   dmem  [NL*DLY_STEPS];

  state_e state;
  logic [$clog2(NL)-1:0] e;
  logic [$clog2(NL)-1:0] ce;       // line end addressed by cfg
  localparam int NW = N > 1 ? $clog2(N) : 1;
  logic [NW-1:0]  kb;              // array index of the end's bus
  logic [PW-1:0]  ptr, ptr_nx;
  logic [PW:0]    seen;            // steps received, saturates at DLY_STEPS
  fx_t  vk, old;

  assign ce = cfg_addr[$clog2(NL):1];
  assign kb = NW'(lnode[e] - 1'b1);

  always_ff @(posedge clk) begin
    if (cfg_we && int'(cfg_addr[15:1]) < NL) begin
      if (cfg_addr[0]) yz[ce]    <= cfg_data;
      else             lnode[ce] <= node_t'(cfg_data);
    end
  end

  always_comb begin
    vk     = (lnode[e] == '0 || int'(lnode[e]) > N) ? '0 : v[kb];
    ptr_nx = (int'(ptr) == DLY_STEPS - 1) ? '0 : ptr + 1'b1;
    old    = (DLY_STEPS == 1) ? s_in[e] : dmem[int'(e) * DLY_STEPS + int'(ptr_nx)];
  end

  always_ff @(posedge clk) begin
    done_inj  <= 1'b0;
    done_upd  <= 1'b0;
    done_hist <= 1'b0;
    inj_we    <= 1'b0;
    if (!rst_n) begin
      state    <= S_IDLE;
      e        <= '0;
      ptr      <= '0;
      seen     <= '0;
      inj_node <= '0;
      inj_val  <= '0;
      for (int k = 0; k < NL; k++) begin
        ik[k]    <= '0;
        s_out[k] <= '0;
      end
    end else begin
      unique case (state)
        S_IDLE: begin
          e <= '0;
          if (start_inj)       state <= S_INJ;
          else if (start_upd)  state <= S_UPD;
          else if (start_hist) state <= S_HIST;
        end
        S_INJ: begin
          inj_we   <= ik[e] != '0;
          inj_node <= lnode[e];
          inj_val  <= ik[e];
          e        <= e + 1'b1;
          if (int'(e) == NL - 1) begin
            state    <= S_IDLE;
            done_inj <= 1'b1;
          end
        end
        S_UPD: begin
          s_out[e] <= fx_mul(yz[e] <<< 1, vk) + ik[e];
          e        <= e + 1'b1;
          if (int'(e) == NL - 1) begin
            state    <= S_IDLE;
            done_upd <= 1'b1;
          end
        end
        S_HIST: begin
          if (DLY_STEPS > 1) dmem[int'(e) * DLY_STEPS + int'(ptr)] <= s_in[e];
          ik[e] <= (int'(seen) >= DLY_STEPS - 1) ? -old : '0;
          e     <= e + 1'b1;
          if (int'(e) == NL - 1) begin
            state     <= S_IDLE;
            done_hist <= 1'b1;
            ptr       <= ptr_nx;
            if (int'(seen) < DLY_STEPS) seen <= seen + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
