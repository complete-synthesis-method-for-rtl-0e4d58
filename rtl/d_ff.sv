// d_ff -- transition D flip-flop built from two RS latches (master Y1, slave
// Y2).
//
// How it works: while the clock c is low, the first pair of gates drives the
// master latch with S1 = D*!C and R1 = !D*!C, so Y1 follows D.  While c is
// high, the master is closed and the second pair drives the slave with
// S2 = C*Y1 and R2 = C*!Y1, so Y2 copies the master.  The result is
//     Y1 = !C*D  + C*y1
//     Y2 = !C*y2 + C*y1
// which is a positive-edge triggered D flip-flop: at the rising edge of c the
// value D had while c was low appears on q, and q then holds until the next
// rising edge.  The output is Y2; Y1 is internal.
//
// Interface: d, c in; q (= Y2) and q_n out.  Timing: d must be stable from
// before the rising edge of c until the master has closed; no other timing
// applies, as the cell is made of latches and gates only.
//
// The structure (two RS latches, the input gating and the inverted clock for
// the second stage) and the equations follow the source method.  The drawing
// of the cell takes the complement of the clock as its pin; this module takes
// the clock C of the equations and forms the complement inside.  There is no
// reset: the state is defined once c has been low and then high.
module d_ff (
  input  logic d,
  input  logic c,
  output logic q,
  output logic q_n
);

  logic c_n;       // the pin drawn as C-bar, feeding the master's gates
  logic c_slave;   // C, from the inverter, feeding the slave's gates
  logic s1, r1, s2, r2;
  logic y1, y1_n;

  assign c_n     = ~c;
  assign c_slave = ~c_n;

  // Master: transparent while the clock is low.
  assign s1 = d  & c_n;
  assign r1 = ~d & c_n;

  rs_latch u_master (
    .s  (s1),
    .r  (r1),
    .q  (y1),
    .q_n(y1_n)
  );

  // Slave: copies the master while the clock is high.
  assign s2 = y1   & c_slave;
  assign r2 = y1_n & c_slave;

  rs_latch u_slave (
    .s  (s2),
    .r  (r2),
    .q  (q),
    .q_n(q_n)
  );

endmodule
