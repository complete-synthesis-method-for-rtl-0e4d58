// dff_async_top -- the three circuits of the method side by side: the
// handshake request sampler (the worked example), a stand-alone transition
// D flip-flop and a stand-alone DRS (Data-Reset-Set) flip-flop, each with its
// own pins.
//
// The three are independent; nothing is shared between them.  The sampler
// itself contains a DRS flip-flop wired as D = X, C = Y, R = !X, S = 0; the
// stand-alone DRS cell exposes all four inputs so that the set and reset
// paths can be used directly.  All three are asynchronous: outputs change as
// soon as inputs do, and there is no system clock.
//
// Interface:
//   hs_x, hs_y -> hs_q, hs_q_n           request sampler (request, acknowledge)
//   dff_d, dff_c -> dff_q, dff_q_n       D flip-flop (data, clock)
//   drs_d, drs_c, drs_s, drs_r -> drs_q, drs_q_n
//                                        DRS flip-flop (data, clock, set, reset;
//                                        set and reset never high together)
// Grouping the cells in one top is this design's choice, made so that all of
// them can be built and exercised together.
module dff_async_top (
  input  logic hs_x,
  input  logic hs_y,
  output logic hs_q,
  output logic hs_q_n,

  input  logic dff_d,
  input  logic dff_c,
  output logic dff_q,
  output logic dff_q_n,

  input  logic drs_d,
  input  logic drs_c,
  input  logic drs_s,
  input  logic drs_r,
  output logic drs_q,
  output logic drs_q_n
);

  handshake_sampler u_sampler (
    .x  (hs_x),
    .y  (hs_y),
    .q  (hs_q),
    .q_n(hs_q_n)
  );

  d_ff u_dff (
    .d  (dff_d),
    .c  (dff_c),
    .q  (dff_q),
    .q_n(dff_q_n)
  );

  drs_ff u_drs (
    .d  (drs_d),
    .c  (drs_c),
    .s  (drs_s),
    .r  (drs_r),
    .q  (drs_q),
    .q_n(drs_q_n)
  );

endmodule
