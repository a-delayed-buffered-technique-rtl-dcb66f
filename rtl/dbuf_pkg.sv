// dbuf_pkg: constants shared by the low-power delay buffer.
//
// The buffer delays a WIDTH-bit stream by DEPTH samples. DEPTH words are
// selected in turn by a one-hot ring of double-edge-triggered flip-flops, and
// the data paths into and out of the storage are gated trees of fan-out
// FANOUT with three levels, so DEPTH = FANOUT**3.
//
// DEPTH = 64 and FANOUT = 4 are the sizes of the gated driver tree this
// design follows (64 memory words reached through 4-way branches on three
// levels). WIDTH = 8 is this design's own choice.
package dbuf_pkg;

  localparam int unsigned DBUF_DEPTH  = 64;
  localparam int unsigned DBUF_WIDTH  = 8;
  localparam int unsigned DBUF_FANOUT = 4;

endpackage : dbuf_pkg
