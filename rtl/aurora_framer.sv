// aurora_framer: user-side framing of one board-to-board fast data link.
//
// The line terms of the ends that share a link are exchanged every time-step
// as one AXI4-Stream frame of NLPL 64-bit words on the user interface of a
// framing Aurora core; the core does the serial link, this unit only frames.
// Word layout (link_word_t): [63:56] word index, [55:32] low bits of the
// step count, [31:0] value; tlast marks word NLPL-1.
// Transmit: a send pulse captures tx_data and the step count and streams the
// frame; tx_busy is high until the last word is accepted.
// Receive: words are stored by position in rx_data; after tlast, rx_full is
// set and tready stays low (backpressure through the link's flow control)
// until rx_ack consumes the frame, so a fast neighbour can never overwrite a
// frame that has not been used. A frame of the wrong length or with words out
// of order sets the sticky rx_err. rx_step gives the step count of the frame.
// The frame size follows the reference design (fifteen 64-bit words per
// exchange); word layout and backpressure rule are this design's.
module aurora_framer
  import rtce_pkg::*;
#(
  parameter int NLPL = 15
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [23:0] step,
  // frame to send
  input  logic        send,
  input  fx_t         tx_data [NLPL],
  output logic        tx_busy,
  // AXI4-Stream towards the link
  output logic [63:0] tx_tdata,
  output logic        tx_tvalid,
  input  logic        tx_tready,
  output logic        tx_tlast,
  // AXI4-Stream from the link
  input  logic [63:0] rx_tdata,
  input  logic        rx_tvalid,
  output logic        rx_tready,
  input  logic        rx_tlast,
  // received frame
  output logic        rx_full,
  output fx_t         rx_data [NLPL],
  output logic [23:0] rx_step,
  input  logic        rx_ack,
  output logic        rx_err
);
  localparam int CW = $clog2(NLPL + 1);

  fx_t         txbuf [NLPL];
  logic [23:0] tx_step;
  logic [CW-1:0] tx_cnt, rx_cnt;
  link_word_t  rxw;

  assign tx_tvalid = tx_busy;
  assign tx_tlast  = tx_busy && (int'(tx_cnt) == NLPL - 1);
  assign tx_tdata  = link_word_t'{idx: 8'(tx_cnt), step: tx_step, value: txbuf[tx_cnt]};
  assign rx_tready = !rx_full;
  assign rxw       = link_word_t'(rx_tdata);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_busy <= 1'b0;
      tx_cnt  <= '0;
      tx_step <= '0;
    end else if (tx_busy) begin
      if (tx_tready) begin
        tx_cnt <= tx_cnt + 1'b1;
        if (int'(tx_cnt) == NLPL - 1) begin
          tx_busy <= 1'b0;
          tx_cnt  <= '0;
        end
      end
    end else if (send) begin
      tx_busy <= 1'b1;
      tx_cnt  <= '0;
      tx_step <= step;
      for (int k = 0; k < NLPL; k++) txbuf[k] <= tx_data[k];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_full <= 1'b0;
      rx_cnt  <= '0;
      rx_err  <= 1'b0;
      rx_step <= '0;
      for (int k = 0; k < NLPL; k++) rx_data[k] <= '0;
    end else begin
      if (rx_ack) rx_full <= 1'b0;
      if (rx_tvalid && rx_tready) begin
        if (int'(rx_cnt) < NLPL) rx_data[rx_cnt] <= rxw.value;
        if (int'(rxw.idx) != int'(rx_cnt)) rx_err <= 1'b1;
        if (rx_cnt == '0) rx_step <= rxw.step;
        if (rx_tlast) begin
          if (int'(rx_cnt) != NLPL - 1) rx_err <= 1'b1;
          rx_full <= 1'b1;
          rx_cnt  <= '0;
        end else if (int'(rx_cnt) == NLPL - 1) begin
          rx_err <= 1'b1;              // frame too long: keep the last slot
        end else begin
          rx_cnt <= rx_cnt + 1'b1;
        end
      end
    end
  end

  // AXI4-Stream rule: once valid, the word holds until it is accepted
  assert property (@(posedge clk) disable iff (!rst_n)
                   tx_tvalid && !tx_tready |=> tx_tvalid && $stable(tx_tdata));
  // a frame is only sent when the previous one has left
  assert property (@(posedge clk) disable iff (!rst_n) send |-> !tx_busy);

endmodule
