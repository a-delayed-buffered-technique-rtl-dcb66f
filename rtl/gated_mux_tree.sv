// gated_mux_tree: gated multiplexer tree on the output side of the storage.
//
// The mirror of gated_demux_tree. Each storage word enters a leaf gate
// enabled by its select e3[j]; FANOUT leaf gates are merged into a block
// node gated by e2, FANOUT block nodes into a group node gated by e1, and
// the groups into the root gated by e0. A disabled gate outputs zero, so the
// merge at each node is an OR, and only the branch that leads from the word
// being read toggles. With one-hot e3 and enables that cover it, dout is
// words[j] for the selected j; with e0 low it is zero.
//
// The three-level FANOUT-way structure follows the reference design's
// gated-multiplexer tree; gates that output zero and merge by OR are this
// design's choice.
//
// Purely combinational.
module gated_mux_tree
#(
  parameter int unsigned DEPTH  = dbuf_pkg::DBUF_DEPTH,
  parameter int unsigned WIDTH  = dbuf_pkg::DBUF_WIDTH,
  parameter int unsigned FANOUT = dbuf_pkg::DBUF_FANOUT,
  localparam int unsigned NBLK  = DEPTH / FANOUT,
  localparam int unsigned NGRP  = NBLK / FANOUT
) (
  input  logic                         e0,
  input  logic [NGRP-1:0]              e1,
  input  logic [NBLK-1:0]              e2,
  input  logic [DEPTH-1:0]             e3,
  input  logic [DEPTH-1:0][WIDTH-1:0]  words,
  output logic [WIDTH-1:0]             dout
);

  logic [NBLK-1:0][WIDTH-1:0]  lvl2;
  logic [NGRP-1:0][WIDTH-1:0]  lvl1;
  logic [WIDTH-1:0]            root;

  always_comb begin
    lvl2 = '0;
    for (int j = 0; j < DEPTH; j++)
      lvl2[j / FANOUT] = lvl2[j / FANOUT] | (words[j] & {WIDTH{e3[j]}});
    for (int k = 0; k < NBLK; k++)
      lvl2[k] = lvl2[k] & {WIDTH{e2[k]}};
    lvl1 = '0;
    for (int k = 0; k < NBLK; k++)
      lvl1[k / FANOUT] = lvl1[k / FANOUT] | lvl2[k];
    for (int g = 0; g < NGRP; g++)
      lvl1[g] = lvl1[g] & {WIDTH{e1[g]}};
    root = '0;
    for (int g = 0; g < NGRP; g++)
      root = root | lvl1[g];
  end

  assign dout = root & {WIDTH{e0}};

endmodule : gated_mux_tree
