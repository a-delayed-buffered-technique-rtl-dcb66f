// det_ff: double-edge-triggered flip-flop, WIDTH bits wide, with a hold
// enable and an asynchronous initialise.
//
// The register takes a new value on the rising and on the falling edge of
// clk, so a stream of one word per edge needs a clock of half the data rate.
// It is built from two ordinary registers, one per edge, whose XOR is the
// output: at a rising edge the rising-edge half is loaded with d XOR the
// falling-edge half, which makes the XOR equal to d, and the falling edge
// does the same the other way round. Unlike a clock-steered output
// multiplexer, the output depends only on register contents, so it has no
// combinational path from the clock and gives no glitch when a gated clock
// makes an extra edge. When en is low at an edge the half being clocked
// keeps its value, and so does q. The enable is this design's addition; the
// ring counter ties it high and the storage words use it as their word
// select. The reference design only names the DET flip-flop; this way of
// building one is this design's choice.
//
// init (active high, asynchronous) sets q to INIT.
//
// Timing: d and en are sampled at every edge of clk; q changes right after
// the edge.
module det_ff #(
  parameter int unsigned      WIDTH = 1,
  parameter logic [WIDTH-1:0] INIT  = '0
) (
  input  logic             clk,
  input  logic             init,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] q_rise;  // written on the rising edge
  logic [WIDTH-1:0] q_fall;  // written on the falling edge

  always_ff @(posedge clk or posedge init) begin
    if (init)    q_rise <= INIT;
    else if (en) q_rise <= d ^ q_fall;
  end

  always_ff @(negedge clk or posedge init) begin
    if (init)    q_fall <= '0;
    else if (en) q_fall <= d ^ q_rise;
  end

  assign q = q_rise ^ q_fall;

endmodule : det_ff
