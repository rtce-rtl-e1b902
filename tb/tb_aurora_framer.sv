// tb_aurora_framer: the transmit stream is looped back into the receiver
// through a one-word register stage that applies random tready stalls. Each
// frame is checked word by word on the wire (index, step, value, tlast only on
// the last word, data held while stalled), then in rx_data. A second frame is
// sent before the first is consumed to see that backpressure holds it until
// rx_ack; finally a short frame is injected by hand and must set rx_err.
module tb_aurora_framer;
  import rtce_pkg::*;
  localparam int NLPL = 4;
  logic clk = 0, rst_n = 0;
  logic [23:0] step;
  logic send, tx_busy;
  fx_t tx_data [NLPL];
  logic [63:0] tx_tdata, rx_tdata;
  logic tx_tvalid, tx_tready, tx_tlast, rx_tvalid, rx_tready, rx_tlast;
  logic rx_full, rx_ack, rx_err;
  fx_t rx_data [NLPL];
  logic [23:0] rx_step;
  logic inject;                      // testbench drives rx by hand
  logic [63:0] inj_data; logic inj_valid, inj_last;
  logic stall;
  int checks = 0, failures = 0, stalls = 0, bp = 0;

  aurora_framer #(.NLPL(NLPL)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // loopback with random stalls: the receiver's tready gates the sender
  assign tx_tready = rx_tready && !stall && !inject;
  assign rx_tdata  = inject ? inj_data  : tx_tdata;
  assign rx_tvalid = inject ? inj_valid : tx_tvalid && !stall;
  assign rx_tlast  = inject ? inj_last  : tx_tlast;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  // wire monitor
  int wcnt = 0;
  logic [63:0] held; logic was_stalled = 0;
  fx_t exp_frame [NLPL];
  logic [23:0] exp_step;
  always @(posedge clk) if (rst_n && !inject) begin
    if (was_stalled) begin
      checks++;
      if (!tx_tvalid || tx_tdata != held) begin failures++; $display("FAIL data changed while stalled"); end
    end
    was_stalled = tx_tvalid && !tx_tready;
    held = tx_tdata;
    if (tx_tvalid && !tx_tready) stalls++;
    if (tx_tvalid && tx_tready) begin
      link_word_t w;
      w = link_word_t'(tx_tdata);
      checks++;
      if (int'(w.idx) != wcnt || w.step != exp_step || w.value != exp_frame[wcnt] ||
          tx_tlast != (wcnt == NLPL-1)) begin
        failures++; $display("FAIL word %0d: %h", wcnt, tx_tdata);
      end
      wcnt = (wcnt == NLPL-1) ? 0 : wcnt + 1;
    end
  end
  always @(posedge clk) stall <= ($urandom_range(0, 3) == 0);

  task automatic send_frame(int s);
    while (tx_busy) @(posedge clk);
    #1;
    for (int k = 0; k < NLPL; k++) begin
      tx_data[k] = fx_t'($urandom);
      exp_frame[k] = tx_data[k];
    end
    step = 24'(s); exp_step = 24'(s);
    send = 1; @(posedge clk); #1 send = 0;
  endtask

  initial begin
    step = 0; send = 0; rx_ack = 0; inject = 0; inj_data = 0; inj_valid = 0; inj_last = 0;
    for (int k = 0; k < NLPL; k++) tx_data[k] = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int f = 0; f < 10; f++) begin
      send_frame(f * 7 + 1);
      while (!rx_full) @(posedge clk);
      #1;
      for (int k = 0; k < NLPL; k++) check("rx_data", rx_data[k], exp_frame[k]);
      check("rx_step", rx_step, f * 7 + 1);
      check("rx_err", rx_err, 0);
      rx_ack = 1; @(posedge clk); #1 rx_ack = 0;
    end
    // backpressure: two frames, the second waits for rx_ack
    send_frame(100);
    while (!rx_full) @(posedge clk);
    #1;
    begin
      fx_t first [NLPL];
      first = rx_data;
      send_frame(101);
      repeat (20) @(posedge clk);
      #1;
      check("held by backpressure", tx_busy, 1);
      check("first frame kept", rx_data[NLPL-1], first[NLPL-1]);
      check("tready low", rx_tready, 0);
      bp++;
      rx_ack = 1; @(posedge clk); #1 rx_ack = 0;
      while (!rx_full) @(posedge clk);
      #1;
      for (int k = 0; k < NLPL; k++) check("second frame", rx_data[k], exp_frame[k]);
      rx_ack = 1; @(posedge clk); #1 rx_ack = 0;
    end
    // short frame: two words then tlast
    while (tx_busy) @(posedge clk);
    #1 inject = 1;
    for (int k = 0; k < 2; k++) begin
      inj_data = {8'(k), 24'd5, 32'(k)}; inj_valid = 1; inj_last = (k == 1);
      @(posedge clk); #1;
    end
    inj_valid = 0; inj_last = 0;
    @(posedge clk); #1;
    check("short frame flagged", rx_err, 1);
    check("stalls seen", stalls > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
