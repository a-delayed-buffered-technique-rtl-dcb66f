// ring_counter_cgate: one-hot ring counter of double-edge-triggered
// flip-flops whose clock is gated block by block with C-elements.
//
// DEPTH DET flip-flops form a ring that circulates a single 1 (the token);
// the token moves one place on every clock edge, rising and falling, so the
// ring visits DEPTH positions in DEPTH/2 clock periods. Bit p of token
// selects storage word p of the delay buffer.
//
// The ring is cut into DEPTH/FANOUT blocks of FANOUT flip-flops. Block b
// runs on its own clock gclk[b] = clk AND grp_en[g] AND blk_en[b], g being
// the group of FANOUT blocks that holds b. blk_en[b] comes from a C-element
// whose inputs are
//   a = the last flip-flop of the previous block (token about to enter), and
//   b = the inverted first flip-flop of the next block (token has left).
// blk_en[b] therefore rises when the token reaches the position just before
// the block and falls when the token has moved into the next block: only
// the block holding the token, and for one edge its neighbour, sees clock
// edges. The same kind of C-element over spans of FANOUT*FANOUT positions
// gives the coarser enables grp_en. The clock is thus distributed through a
// two-level gated driver tree (group drivers, then block drivers), and
// grp_en, blk_en and token are also the three levels of enables of the gated
// data trees. A group's enable window contains the windows of all its
// blocks, so the group level never cuts a block clock that is needed.
//
// Why this is glitch-safe: FANOUT must be even. The token is loaded at
// position 0 and the first edge after init is a falling one (init must be
// released while clk is high, see delay_buffer), so odd positions are
// reached on falling edges and even positions on rising edges. A block's
// enable rises after a falling edge (clk low: no edge on gclk) and falls
// after a rising edge, which gives gclk one extra falling edge at a moment
// when the block holds only zeros and its input is zero, so nothing changes.
//
// The ring of DET flip-flops, the division into blocks, the C-element per
// block and the AND gate that forms each block clock follow the reference
// design. Which ring outputs feed each C-element, the even FANOUT, the
// group level of the clock tree and of the enables (the reference design
// applies gated driver trees to the clock network and to the data ports) and
// the single active-high init are this design's own reading of it.
//
// Interface: clk is the global clock, init (active high, asynchronous) loads
// the token at position 0 and enables block 0 and group 0. Outputs change
// right after each clock edge.
module ring_counter_cgate
#(
  parameter int unsigned DEPTH  = dbuf_pkg::DBUF_DEPTH,
  parameter int unsigned FANOUT = dbuf_pkg::DBUF_FANOUT,
  localparam int unsigned NBLK  = DEPTH / FANOUT,
  localparam int unsigned SPAN  = FANOUT * FANOUT,
  localparam int unsigned NGRP  = DEPTH / SPAN
) (
  input  logic            clk,
  input  logic            init,
  output logic [DEPTH-1:0] token,
  output logic [NBLK-1:0]  blk_en,
  output logic [NGRP-1:0]  grp_en,
  output logic [NBLK-1:0]  gclk
);

  if (FANOUT < 2 || FANOUT % 2 != 0) begin : g_bad_fanout
    $error("ring_counter_cgate: FANOUT must be even and at least 2");
  end
  if (NGRP < 2 || DEPTH % SPAN != 0) begin : g_bad_depth
    $error("ring_counter_cgate: DEPTH must be a multiple of 2*FANOUT*FANOUT");
  end

  // Gated clock tree: the global clock drives NGRP group clock drivers,
  // each enabled by its group's C-element, and each group clock drives the
  // FANOUT block clocks of the group, each enabled by its block's C-element.
  logic [NGRP-1:0] gclk_grp;

  for (genvar g = 0; g < NGRP; g++) begin : g_grp_clk
    assign gclk_grp[g] = clk & grp_en[g];
  end

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    // Clock gate of block b.
    assign gclk[b] = gclk_grp[b / FANOUT] & blk_en[b];

    c_element #(.INIT(b == 0)) u_cel (
      .init (init),
      .a    (token[(b * FANOUT + DEPTH - 1) % DEPTH]),
      .b    (~token[((b + 1) * FANOUT) % DEPTH]),
      .c    (blk_en[b])
    );

    for (genvar i = 0; i < FANOUT; i++) begin : g_stage
      localparam int unsigned P = b * FANOUT + i;
      det_ff #(.WIDTH(1), .INIT(P == 0)) u_det (
        .clk  (gclk[b]),
        .init (init),
        .en   (1'b1),
        .d    (token[(P + DEPTH - 1) % DEPTH]),
        .q    (token[P])
      );
    end
  end

  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    c_element #(.INIT(g == 0)) u_cel (
      .init (init),
      .a    (token[(g * SPAN + DEPTH - 1) % DEPTH]),
      .b    (~token[((g + 1) * SPAN) % DEPTH]),
      .c    (grp_en[g])
    );
  end

endmodule : ring_counter_cgate
