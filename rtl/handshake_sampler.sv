// handshake_sampler -- a request sampler for a handshake between two
// unrelated clock domains, realised with one DRS flip-flop.
//
// What it does: the request X is sampled by the rising edge of the local
// acknowledge Y; if X is high at that edge the local operation Q starts
// (Q = 1).  Q ends asynchronously, the moment X returns to 0, whatever Y is
// doing.  A rising edge of Y while X is low, or X rising while Y is already
// high, does not start Q.  The specification is a four-state flow table over
// the inputs (X, Y) with output Q:
//     state (q1 q2)  XY=00  01  11  10   Q
//       1   (0 0)      1    1   1   4    0
//       2   (0 1)      1    1   -   -    1
//       3   (1 1)      1    2   3   3    1
//       4   (1 0)      1    -   3   4    0
// with q1 the master and q2 the slave latch of the flip-flop, Q = q2.
//
// How it works: solving the flip-flop's input maps for this table gives
// D = X, C = Y, R = !X and S = 0, which is all the logic there is: one
// inverter and the DRS flip-flop.
//
// Interface: x, y in; q and q_n out.  No clock other than y, no reset other
// than x low: holding x low clears q.
//
// The table, state assignment and connection equations are those of the
// source method's synthesis example.
module handshake_sampler (
  input  logic x,
  input  logic y,
  output logic q,
  output logic q_n
);

  logic x_n;

  assign x_n = ~x;

  drs_ff u_ff (
    .d  (x),
    .c  (y),
    .s  (1'b0),
    .r  (x_n),
    .q  (q),
    .q_n(q_n)
  );

endmodule
