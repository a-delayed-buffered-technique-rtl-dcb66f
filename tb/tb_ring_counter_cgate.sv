// tb_ring_counter_cgate: self-checking test of the clock-gated ring counter.
//
// After init the token must sit at position 0 and advance by one position on
// every clock edge, rising and falling. After each edge the test checks the
// whole one-hot token word, every block enable (high while the token is at
// most FANOUT positions past the block's predecessor position) and every
// group enable (the same over FANOUT*FANOUT positions). Over whole
// revolutions it counts the rising edges of each block clock: FANOUT/2+1 per
// revolution, against DEPTH/2 for the global clock, and likewise the group
// clocks of the clock tree: FANOUT*FANOUT/2+1 per revolution.
module tb_ring_counter_cgate;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned DEPTH  = dbuf_pkg::DBUF_DEPTH;
  localparam int unsigned FANOUT = dbuf_pkg::DBUF_FANOUT;
  localparam int unsigned NBLK   = DEPTH / FANOUT;
  localparam int unsigned SPAN   = FANOUT * FANOUT;
  localparam int unsigned NGRP   = DEPTH / SPAN;
  localparam int unsigned REVS   = 3;

  logic clk = 1'b0, init = 1'b0;
  logic [DEPTH-1:0] token;
  logic [NBLK-1:0]  blk_en, gclk;
  logic [NGRP-1:0]  grp_en;
  int checks = 0, failures = 0;
  bit counting = 1'b0;
  int unsigned rises [NBLK];
  int unsigned grp_rises [NGRP];

  ring_counter_cgate dut (.clk, .init, .token, .blk_en, .grp_en, .gclk);

  for (genvar b = 0; b < NBLK; b++) begin : g_cnt
    always @(posedge gclk[b]) if (counting) rises[b]++;
  end
  for (genvar g = 0; g < NGRP; g++) begin : g_gcnt
    always @(posedge dut.gclk_grp[g]) if (counting) grp_rises[g]++;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Expected outputs with the token at position p.
  function automatic bit win(int unsigned p, int unsigned start, int unsigned len);
    return ((p + DEPTH - start) % DEPTH) <= len;
  endfunction

  task automatic check_state(int unsigned p);
    check(token == (DEPTH'(1) << p), $sformatf("token %h, expected position %0d", token, p));
    for (int b = 0; b < NBLK; b++)
      check(blk_en[b] == win(p, (b * FANOUT + DEPTH - 1) % DEPTH, FANOUT),
            $sformatf("blk_en[%0d]=%b at position %0d", b, blk_en[b], p));
    for (int g = 0; g < NGRP; g++)
      check(grp_en[g] == win(p, (g * SPAN + DEPTH - 1) % DEPTH, SPAN),
            $sformatf("grp_en[%0d]=%b at position %0d", g, grp_en[g], p));
  endtask

  initial begin
    #2 init = 1'b1;
    #2 clk = 1'b1;                     // clock runs during init
    #5 clk = 1'b0;
    #5 clk = 1'b1;
    #2 init = 1'b0;                    // release while clk is high
    check_state(0);
    foreach (rises[b]) rises[b] = 0;
    foreach (grp_rises[g]) grp_rises[g] = 0;
    counting = 1'b1;
    for (int unsigned e = 0; e < REVS * DEPTH; e++) begin
      #3 clk = ~clk;
      #2 check_state((e + 1) % DEPTH);
    end
    counting = 1'b0;
    foreach (rises[b])
      check(rises[b] == REVS * (FANOUT / 2 + 1),
            $sformatf("block %0d clock rose %0d times", b, rises[b]));
    foreach (grp_rises[g])
      check(grp_rises[g] == REVS * (SPAN / 2 + 1),
            $sformatf("group %0d clock rose %0d times", g, grp_rises[g]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_ring_counter_cgate
