// c_element: Muller C-element with an asynchronous initialise.
//
// The output c takes the value of the inputs when a and b agree and keeps
// its value while they differ. It is a state-holding gate with no clock; it
// is written here as a level-sensitive latch that is open while a == b and
// whose data input is a. The latch this infers is the C-element's own
// storage and is intended.
//
// init (active high) forces c to INIT. The initialise input is this
// design's addition: the ring counter needs its gating signals in a known
// state when the token is loaded.
module c_element #(
  parameter logic INIT = 1'b0
) (
  input  logic init,
  input  logic a,
  input  logic b,
  output logic c
);

  always_latch begin
    if (init)        c = INIT;
    else if (a == b) c = a;
  end

endmodule : c_element
