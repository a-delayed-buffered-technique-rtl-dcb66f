// gated_demux_tree: gated driver tree on the input side of the storage.
//
// The input word is not broadcast to all DEPTH storage words. It passes a
// tree of gated drivers with three levels of fan-out FANOUT: the root
// driver (enable e0), NGRP group drivers (e1), NBLK block drivers (e2) and
// one leaf driver per word (e3). A gated driver passes its input when its
// enable is high and holds its output at zero otherwise, so only the branch
// that leads to the word being written toggles; every other branch stays
// quiet. With one-hot e3 and enables that cover it, leaf[j] equals din for
// the selected word and zero for all others.
//
// The tree shape (root, then FANOUT-way branches over three levels down to
// one leaf per word) follows the reference design; modelling a disabled
// driver as a zero output is this design's choice.
//
// Purely combinational.
module gated_demux_tree
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
  input  logic [WIDTH-1:0]             din,
  output logic [DEPTH-1:0][WIDTH-1:0]  leaf
);

  logic [WIDTH-1:0]            root;
  logic [NGRP-1:0][WIDTH-1:0]  lvl1;
  logic [NBLK-1:0][WIDTH-1:0]  lvl2;

  assign root = din & {WIDTH{e0}};

  always_comb begin
    for (int g = 0; g < NGRP; g++)  lvl1[g] = root & {WIDTH{e1[g]}};
    for (int k = 0; k < NBLK; k++)  lvl2[k] = lvl1[k / FANOUT] & {WIDTH{e2[k]}};
    for (int j = 0; j < DEPTH; j++) leaf[j] = lvl2[j / FANOUT] & {WIDTH{e3[j]}};
  end

endmodule : gated_demux_tree
