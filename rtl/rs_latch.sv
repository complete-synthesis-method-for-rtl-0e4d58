// rs_latch -- set/reset storage element, the feedback element of every
// flip-flop in this design.
//
// Behaviour: the next state is Q = S + !R * q.  While s is high the latch is
// set, while r is high (and s low) it is cleared, and with both low it holds
// what it had.  The pair s = r = 1 is outside the operating rules (S * R = 0);
// the equation above resolves it as "set wins", and a deferred assertion
// reports it if it is still present once a time step has settled.  Short
// overlaps inside a time step (one latch's output still travelling to the
// gates of the next) are tolerated, since they never reach the end of the
// step.
//
// Interface: s, r in; q and its complement q_n out.  There is no clock: the
// element is level sensitive and changes as soon as its inputs do.
//
// The characteristic equation and the S*R = 0 rule are the source method's.
// Describing the element as a level-sensitive latch (enable s|r, data s)
// rather than as two cross-coupled gates is this design's choice: it gives
// the same function and keeps the feedback inside one storage cell, so tools
// see a latch (reported as one) instead of a combinational loop.  The latch is
// deliberate; it is the storage element of an asynchronous design.
module rs_latch (
  input  logic s,
  input  logic r,
  output logic q,
  output logic q_n
);

  // Q = S + !R * q: write when set or reset is asserted, set dominant.
  always_latch begin
    if (s || r) q = s;
  end

  assign q_n = ~q;

  // Operating rule of the element: set and reset are never asserted together
  // in a settled state.
  always_comb begin
    a_set_reset_exclusive : assert final (!(s && r))
      else $error("rs_latch: set and reset asserted together");
  end

endmodule
