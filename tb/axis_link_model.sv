// axis_link_model: behavioural model of one direction of a board-to-board
// fast link (framing Aurora core, transceivers and fibre) at its AXI4-Stream
// user ports. Words accepted from the sender appear at the receiver LAT
// clocks later, in order; the model buffers up to DEPTH words and applies
// backpressure to the sender when full. While hold is high nothing is
// delivered (a link hiccup). While skew is high, the step count of every
// accepted word is raised by one (a frame from the wrong step).
// Not synthesizable; for testbenches only.
module axis_link_model #(
  parameter int LAT   = 95,     // 0.95 us at 100 MHz
  parameter int DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hold,
  input  logic        skew,
  input  logic [63:0] s_tdata,
  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic        s_tlast,
  output logic [63:0] m_tdata,
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic        m_tlast
);
  typedef struct { logic [63:0] d; logic l; longint t; } ent_t;
  ent_t q [$];
  longint now;

  assign s_tready = rst_n && (q.size() < DEPTH);

  always_comb begin
    m_tvalid = 1'b0;
    m_tdata  = '0;
    m_tlast  = 1'b0;
    if (q.size() > 0 && !hold && q[0].t + LAT <= now) begin
      m_tvalid = 1'b1;
      m_tdata  = q[0].d;
      m_tlast  = q[0].l;
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      q.delete();
      now <= 0;
    end else begin
      now <= now + 1;
      if (m_tvalid && m_tready) void'(q.pop_front());
      if (s_tvalid && s_tready) q.push_back('{d: skew ? s_tdata + (64'd1 << 32) : s_tdata, l: s_tlast, t: now});
    end
  end
endmodule
