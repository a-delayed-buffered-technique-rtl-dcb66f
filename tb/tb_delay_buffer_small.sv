// tb_delay_buffer_small: the end-to-end test of tb_delay_buffer on a second
// configuration, DEPTH 16, WIDTH 5, FANOUT 2 (8 ring blocks of 2, 4 groups),
// to show the parameters scale the ring, the clock tree and both data trees.
//
// Streams random words into delay_buffer, one per clock edge (rising and
// falling), and checks that the word a consumer samples from dout at each
// edge is the din sampled DEPTH edges earlier: exact latency, full rate.
// The reference is a plain history array in the testbench.
//
// Mechanisms exercised and counted (each must happen at least once):
//   - clock gating: every ring block's gated clock must rise exactly
//     FANOUT/2+1 times per ring revolution, against DEPTH/2 rising edges of
//     the global clock; the suppressed block edges are counted;
//   - block and group enable hand-overs (C-element outputs rising);
//   - input gated driver tree: in every slot only the selected word's leaf
//     carries din, all other leaves are held at zero;
//   - token wrap-around (ring revolution);
//   - re-initialisation in the middle of a stream, after which the buffer
//     must again deliver the stream with the same latency.
module tb_delay_buffer_small;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned DEPTH  = 16;
  localparam int unsigned WIDTH  = 5;
  localparam int unsigned FANOUT = 2;
  localparam int unsigned NBLK   = DEPTH / FANOUT;
  localparam int unsigned NGRP   = NBLK / FANOUT;
  localparam int unsigned REV1   = 3;  // revolutions in phase 1
  localparam int unsigned REV2   = 2;  // revolutions after re-init

  logic             clk = 1'b0;
  logic             init = 1'b0;
  logic [WIDTH-1:0] din = '0;
  logic [WIDTH-1:0] dout;

  int checks = 0, failures = 0;

  delay_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH), .FANOUT(FANOUT)) dut (.clk(clk), .init(init), .din(din), .dout(dout));

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    #(20 * (REV1 + REV2 + 4) * DEPTH * 1ns);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Event counters.
  bit counting = 1'b0;
  int unsigned gclk_rises [NBLK];
  int unsigned clk_rises = 0, blk_handover = 0, grp_handover = 0, wraps = 0, reinits = 0,
               gated_slots = 0;

  always @(posedge clk) if (counting) clk_rises++;
  for (genvar b = 0; b < NBLK; b++) begin : g_cnt
    always @(posedge dut.gclk[b]) if (counting) gclk_rises[b]++;
    always @(posedge dut.blk_en[b]) if (!init) blk_handover++;
  end
  for (genvar g = 0; g < NGRP; g++) begin : g_gcnt
    always @(posedge dut.grp_en[g]) if (!init) grp_handover++;
  end
  always @(posedge dut.token[0]) if (!init) wraps++;

  logic [WIDTH-1:0] hist [$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Release init while clk is low, then stream NSAMP samples, one per edge,
  // starting with the first (falling) edge after the internal release.
  task automatic stream(input int unsigned nsamp, input bit count_gating);
    hist.delete();
    @(negedge clk);
    #2 init = 1'b0;
    @(posedge clk);               // internal init released here
    #1 din = WIDTH'($urandom);
    if (count_gating) begin
      counting = 1'b1;
      foreach (gclk_rises[b]) gclk_rises[b] = 0;
    end
    for (int unsigned e = 0; e < nsamp; e++) begin
      #3;                         // 1 ns before edge e
      // Input tree gating: only the selected word's leaf carries din.
      begin
        int unsigned live = 0;
        for (int j = 0; j < DEPTH; j++)
          if (dut.wdata[j] != '0 && !dut.token[j]) live++;
        check(live == 0, $sformatf("edge %0d: %0d unselected leaves driven", e, live));
        check(dut.wdata[e % DEPTH] == din, $sformatf("edge %0d: selected leaf is not din", e));
        if (din != '0) gated_slots++;
      end
      if (e >= DEPTH)
        check(dout == hist[e - DEPTH],
              $sformatf("edge %0d: dout %h, expected %h", e, dout, hist[e - DEPTH]));
      @(clk);
      hist.push_back(din);
      #1 din = WIDTH'($urandom);
    end
    counting = 1'b0;
  endtask

  initial begin
    // Give init a rising edge after the first clock edge, so that the
    // asynchronous initialise reaches every register.
    @(posedge clk);
    #2 init = 1'b1;
    repeat (3) @(posedge clk);

    // Phase 1: REV1 full revolutions, with clock-gating accounting.
    stream(REV1 * DEPTH, 1'b1);
    check(clk_rises == REV1 * DEPTH / 2, $sformatf("clk rises %0d", clk_rises));
    for (int b = 0; b < NBLK; b++)
      check(gclk_rises[b] == REV1 * (FANOUT / 2 + 1),
            $sformatf("block %0d gated clock rose %0d times, expected %0d",
                      b, gclk_rises[b], REV1 * (FANOUT / 2 + 1)));

    // Phase 2: re-initialise in the middle of the stream.
    @(negedge clk);
    init = 1'b1;
    reinits++;
    repeat (2) @(posedge clk);
    stream(REV2 * DEPTH + DEPTH / 2, 1'b0);

    begin
      int unsigned gated_total = 0, suppressed;
      foreach (gclk_rises[b]) gated_total += gclk_rises[b];
      suppressed = NBLK * clk_rises - gated_total;
      $display("mechanisms: suppressed block clock edges=%0d (of %0d) block hand-overs=%0d group hand-overs=%0d wraps=%0d re-inits=%0d input-tree writes=%0d",
               suppressed, NBLK * clk_rises, blk_handover, grp_handover, wraps, reinits, gated_slots);
      check(suppressed > 0, "clock gating never suppressed an edge");
      check(blk_handover > 0, "no block enable hand-over");
      check(grp_handover > 0, "no group enable hand-over");
      check(wraps > 0, "token never wrapped around");
      check(reinits > 0, "no re-initialisation");
      check(gated_slots > 0, "input tree never drove a word");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_delay_buffer_small
