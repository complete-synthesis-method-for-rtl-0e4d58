// async_ref_pkg -- reference behaviour used by the testbenches, written from
// the specifications rather than from the circuits.
//
//   * rs_next:     Q = S + !R*q (set wins; the testbenches never drive both).
//   * dff_next:    a positive-edge D flip-flop with asynchronous set and
//                  reset, the behaviour expected of the DRS cell (and, with
//                  s = r = 0, of the plain D cell).  Inputs change one at a
//                  time, so the data seen at a rising clock edge is the data
//                  of the step before.
//   * hs_settle:   the request sampler's flow table.  From a state and an
//                  input column it follows the table until a stable entry
//                  is reached and returns that state; hs_output gives Q.
package async_ref_pkg;

  function automatic logic rs_next(logic s, logic r, logic q);
    return s | (~r & q);
  endfunction

  function automatic logic dff_next(logic q, logic c_prev, logic c, logic d,
                                    logic s, logic r);
    if (s)                return 1'b1;
    if (r)                return 1'b0;
    if (!c_prev && c)     return d;
    return q;
  endfunction

  // Flow-table states 1..4 of the sampler.
  typedef enum int {HS_S1 = 1, HS_S2 = 2, HS_S3 = 3, HS_S4 = 4} hs_state_t;

  // One entry of the flow table (column index = {x, y}); -1 = unspecified.
  function automatic int hs_entry(hs_state_t st, logic x, logic y);
    case (st)
      HS_S1:   case ({x, y}) 2'b00: return 1; 2'b01: return 1; 2'b11: return 1; default: return 4; endcase
      HS_S2:   case ({x, y}) 2'b00: return 1; 2'b01: return 1; default: return -1; endcase
      HS_S3:   case ({x, y}) 2'b00: return 1; 2'b01: return 2; 2'b11: return 3; default: return 3; endcase
      default: case ({x, y}) 2'b00: return 1; 2'b01: return -1; 2'b11: return 3; default: return 4; endcase
    endcase
  endfunction

  // Follow unstable entries to the stable one; -1 if an unspecified entry
  // is met (an input sequence the table does not allow).
  function automatic int hs_settle(hs_state_t st, logic x, logic y);
    int nxt;
    for (int i = 0; i < 4; i++) begin
      nxt = hs_entry(st, x, y);
      if (nxt < 0) return -1;
      if (nxt == int'(st)) return nxt;
      st = hs_state_t'(nxt);
    end
    return -1;
  endfunction

  function automatic logic hs_output(hs_state_t st);
    return (st == HS_S2) || (st == HS_S3);
  endfunction

endpackage
