// drs_ff -- Data-Reset-Set flip-flop: the two-latch transition D flip-flop
// with asynchronous Set and Reset added to both latches.
//
// How it works: the D flip-flop's gating is kept and the set and reset inputs
// are merged into it, so that the state equations become
//     Y1 = !C*D + C*S + !(!C*!D + C*R) * y1
//        = !C*D + C*S + (C*!R + !C*D) * y1
//     Y2 = S + C*y1 + !(R + C*!y1) * y2
//        = S + C*y1 + !R*(!C + y1) * y2
// i.e. master S1 = !C*D + C*S, R1 = !C*!D + C*R and slave S2 = S + C*Y1,
// R2 = R + C*!Y1.  S and R force the output Y2 at once, whatever the clock
// does.  While the clock is high they also force the master, so that after
// they are released the slave keeps the forced value until the next rising
// edge; while the clock is low the master keeps following D.  With S and R
// low the cell is the plain positive-edge D flip-flop.
//
// Interface: d, c, s, r in; q (= Y2) and q_n out.  Operating rule: s and r
// are never high together (S * R = 0), checked by a deferred assertion.  When
// c is high and r rises while the master holds a 1, the slave briefly sees
// both of its inputs high until the master has cleared; this settles within
// the same instant and is allowed.
//
// The equations and gate arrangement follow the source method.  The clock
// port is C of the equations (the drawing's pin is its complement), as in
// d_ff.
module drs_ff (
  input  logic d,
  input  logic c,
  input  logic s,
  input  logic r,
  output logic q,
  output logic q_n
);

  logic c_n, c_slave;
  logic s1, r1, s2, r2;
  logic y1, y1_n;

  assign c_n     = ~c;
  assign c_slave = ~c_n;

  // Master: follows D while the clock is low, takes S or R while it is high.
  assign s1 = (d  & c_n) | (c_slave & s);
  assign r1 = (~d & c_n) | (c_slave & r);

  rs_latch u_master (
    .s  (s1),
    .r  (r1),
    .q  (y1),
    .q_n(y1_n)
  );

  // Slave: copies the master while the clock is high; S and R act directly.
  assign s2 = (y1   & c_slave) | s;
  assign r2 = (y1_n & c_slave) | r;

  rs_latch u_slave (
    .s  (s2),
    .r  (r2),
    .q  (q),
    .q_n(q_n)
  );

  always_comb begin
    a_set_reset_exclusive : assert final (!(s && r))
      else $error("drs_ff: set and reset asserted together");
  end

endmodule
