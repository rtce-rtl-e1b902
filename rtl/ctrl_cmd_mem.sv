// ctrl_cmd_mem: control-command block memory between the processor and the
// power-system emulation.
//
// The processor (through the DMA memory interface) writes control commands
// here: word 0 selects the network topology (the matrix set the solver uses),
// words 1.. hold the breaker mask, one bit per branch, 1 = closed. The EMT
// side never reads the words directly: a pulse on latch, given at the start
// of each time-step, copies them into set_sel and br_en, so a command takes
// effect on a step boundary and never half-way through a step. changed pulses
// with latch when the copied command differs from the one in force. Reads on
// the processor side return the stored words one clock after the address.
// After reset: set 0, all breakers closed. The command path follows the
// reference design; the word layout is this design's.
module ctrl_cmd_mem
  import rtce_pkg::*;
#(
  parameter int NB_BR = 32,
  parameter int NSET  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [3:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic        latch,
  output logic [$clog2(NSET)-1:0] set_sel,
  output logic [NB_BR-1:0]        br_en,
  output logic        changed
);
  localparam int MW    = (NB_BR + 31) / 32;     // mask words
  localparam int WORDS = 1 + MW;
  localparam int WA    = WORDS > 1 ? $clog2(WORDS) : 1;

  logic [31:0]            mem [WORDS];
  logic [MW*32-1:0]       mask;
  logic [$clog2(NSET)-1:0] set_nx;

  always_comb begin
    for (int w = 0; w < MW; w++) mask[w*32 +: 32] = mem[w+1];
    set_nx = mem[0][$clog2(NSET)-1:0];
  end

  always_ff @(posedge clk) begin
    changed <= 1'b0;
    if (!rst_n) begin
      mem[0] <= '0;
      for (int w = 1; w < WORDS; w++) mem[w] <= '1;
      set_sel <= '0;
      br_en   <= '1;
      rdata   <= '0;
    end else begin
      if (we && int'(addr) < WORDS) mem[WA'(addr)] <= wdata;
      rdata <= (int'(addr) < WORDS) ? mem[WA'(addr)] : '0;
      if (latch) begin
        set_sel <= set_nx;
        br_en   <= mask[NB_BR-1:0];
        changed <= (set_nx != set_sel) || (mask[NB_BR-1:0] != br_en);
      end
    end
  end

endmodule
