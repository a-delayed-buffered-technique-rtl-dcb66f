// delay_buffer: low-power delay buffer, DEPTH samples long and WIDTH bits
// wide, built from a clock-gated ring counter and gated driver trees.
//
// Data flow (one sample per clock edge, rising and falling):
//   din -> gated_demux_tree -> delay_memory -> gated_mux_tree -> dout
//                     ^              ^               ^
//                     +------ ring_counter_cgate ----+
// Nothing moves between storage words. The ring counter's one-hot token
// selects the word of the current slot. At each clock edge that word is
// written with din; between edges the same word, which still holds the
// sample written DEPTH edges earlier, is driven to dout. A consumer that
// samples dout at an edge therefore sees the din it sampled DEPTH edges
// before: the delay is DEPTH samples, or DEPTH/2 clock periods.
//
// Power: the ring and the storage only get clock edges in the block that
// holds the token (C-element clock gating), and the input and output data
// paths only toggle along the one branch of each tree that leads to that
// word. The three enable levels of both trees come from the ring counter:
// grp_en (FANOUT*FANOUT words), blk_en (FANOUT words) and the token itself.
// The root of both trees is enabled whenever the buffer is not being
// initialised.
//
// Reset: init is active high and asynchronous. It is registered on the
// rising clock edge before it reaches the ring counter, so the ring is
// released while clk is high and its first step is on a falling edge, which
// the gating scheme of ring_counter_cgate requires. After init falls, dout
// is meaningful once DEPTH samples have been written.
//
// The block structure (gated driver tree, memory, gated driver tree, with
// the ring counter selecting words) follows the reference design; the init
// register, the root enable and WIDTH are this design's choices.
module delay_buffer
#(
  parameter int unsigned DEPTH  = dbuf_pkg::DBUF_DEPTH,
  parameter int unsigned WIDTH  = dbuf_pkg::DBUF_WIDTH,
  parameter int unsigned FANOUT = dbuf_pkg::DBUF_FANOUT,
  localparam int unsigned NBLK  = DEPTH / FANOUT,
  localparam int unsigned NGRP  = NBLK / FANOUT
) (
  input  logic             clk,
  input  logic             init,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic                        init_q;
  logic                        run;
  logic [DEPTH-1:0]            token;
  logic [NBLK-1:0]             blk_en;
  logic [NGRP-1:0]             grp_en;
  logic [NBLK-1:0]             gclk;
  logic [DEPTH-1:0][WIDTH-1:0] wdata;
  logic [DEPTH-1:0][WIDTH-1:0] rdata;

  // Assert at once, release on a rising edge.
  always_ff @(posedge clk or posedge init) begin
    if (init) init_q <= 1'b1;
    else      init_q <= 1'b0;
  end

  assign run = ~init_q;

  ring_counter_cgate #(.DEPTH(DEPTH), .FANOUT(FANOUT)) u_ring (
    .clk    (clk),
    .init   (init_q),
    .token  (token),
    .blk_en (blk_en),
    .grp_en (grp_en),
    .gclk   (gclk)
  );

  gated_demux_tree #(.DEPTH(DEPTH), .WIDTH(WIDTH), .FANOUT(FANOUT)) u_in_tree (
    .e0   (run),
    .e1   (grp_en),
    .e2   (blk_en),
    .e3   (token),
    .din  (din),
    .leaf (wdata)
  );

  delay_memory #(.DEPTH(DEPTH), .WIDTH(WIDTH), .FANOUT(FANOUT)) u_mem (
    .gclk  (gclk),
    .we    (token & {DEPTH{run}}),
    .wdata (wdata),
    .rdata (rdata)
  );

  gated_mux_tree #(.DEPTH(DEPTH), .WIDTH(WIDTH), .FANOUT(FANOUT)) u_out_tree (
    .e0    (run),
    .e1    (grp_en),
    .e2    (blk_en),
    .e3    (token),
    .words (rdata),
    .dout  (dout)
  );

endmodule : delay_buffer
