// tb_ctrl_cmd_mem: checks reset values, read-back of written words, that the
// EMT-side outputs only change on latch, and that changed pulses only when the
// latched command differs from the one in force.
module tb_ctrl_cmd_mem;
  localparam int NB_BR = 40, NSET = 4;
  logic clk = 0, rst_n = 0;
  logic we, latch, changed;
  logic [3:0] addr; logic [31:0] wdata, rdata;
  logic [1:0] set_sel; logic [NB_BR-1:0] br_en;
  int checks = 0, failures = 0;

  ctrl_cmd_mem #(.NB_BR(NB_BR), .NSET(NSET)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    we = 1; addr = 4'(a); wdata = d; @(posedge clk); #1 we = 0;
  endtask

  initial begin
    we = 0; latch = 0; addr = 0; wdata = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    check("reset set", set_sel, 0);
    check("reset mask", br_en, {NB_BR{1'b1}});
    wr(0, 32'd2); wr(1, 32'hFFFF_FF7F); wr(2, 32'h0000_00F0);
    addr = 0; @(posedge clk); #1 check("read0", rdata, 2);
    addr = 1; @(posedge clk); #1 check("read1", rdata, 32'hFFFF_FF7F);
    check("no latch set", set_sel, 0);
    check("no latch mask", br_en, {NB_BR{1'b1}});
    latch = 1; @(posedge clk); #1 latch = 0;
    check("latched set", set_sel, 2);
    check("latched mask", br_en, 40'hF0_FFFF_FF7F);
    check("changed", changed, 1);
    @(posedge clk); #1 check("changed pulse", changed, 0);
    latch = 1; @(posedge clk); #1 latch = 0;
    check("unchanged", changed, 0);
    for (int n = 0; n < 20; n++) begin
      logic [31:0] d0, d1, d2;
      d0 = $urandom_range(0, 3); d1 = $urandom; d2 = $urandom;
      wr(0, d0); wr(1, d1); wr(2, d2);
      latch = 1; @(posedge clk); #1 latch = 0;
      check("rand set", set_sel, d0);
      check("rand mask", br_en, {d2[7:0], d1});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
