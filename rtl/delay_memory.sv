// delay_memory: storage array of the delay buffer.
//
// DEPTH words of WIDTH bits, each a WIDTH-bit double-edge-triggered
// register (det_ff). Word j is written with wdata[j] at a clock edge when
// we[j] is high and keeps its value otherwise. Words are clocked in blocks
// of FANOUT: word j runs on gclk[j / FANOUT], the gated clock of the ring
// counter block that holds word j's select, so words whose block is idle see
// no clock edges at all. All words are read in parallel on rdata; the
// output gated multiplexer tree picks the one being read.
//
// In the delay buffer we is the one-hot token of the ring counter, so one
// word is written per clock edge, and the word read in a slot is the one
// about to be overwritten, written DEPTH edges earlier.
//
// The reference design only names this block (a memory whose words are
// selected in turn by the ring counter); using DET registers and the ring's
// block clocks is this design's choice. The words are not reset: a delay
// buffer's first DEPTH outputs are not meaningful.
module delay_memory
#(
  parameter int unsigned DEPTH  = dbuf_pkg::DBUF_DEPTH,
  parameter int unsigned WIDTH  = dbuf_pkg::DBUF_WIDTH,
  parameter int unsigned FANOUT = dbuf_pkg::DBUF_FANOUT,
  localparam int unsigned NBLK  = DEPTH / FANOUT
) (
  input  logic [NBLK-1:0]              gclk,
  input  logic [DEPTH-1:0]             we,
  input  logic [DEPTH-1:0][WIDTH-1:0]  wdata,
  output logic [DEPTH-1:0][WIDTH-1:0]  rdata
);

  for (genvar j = 0; j < DEPTH; j++) begin : g_word
    det_ff #(.WIDTH(WIDTH), .INIT('0)) u_word (
      .clk  (gclk[j / FANOUT]),
      .init (1'b0),
      .en   (we[j]),
      .d    (wdata[j]),
      .q    (rdata[j])
    );
  end

endmodule : delay_memory
