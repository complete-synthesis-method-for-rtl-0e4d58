// handshake_sampler_tb -- self-checking test of the request sampler against
// its four-state flow table.
//
// Holding x low first brings the circuit to state 1.  Then x or y changes,
// one at a time (fundamental mode: the circuit settles between changes).
// After each change the expected stable state is found by following the flow
// table, and q, q_n are compared with that state's output.  Counted: starts
// (rising y with x high), asynchronous ends (x falling while q is high, with
// y high and with y low), rising y with x low (no start), and x rising with
// y already high (no start); each must occur.
module handshake_sampler_tb;
  import async_ref_pkg::*;

  logic x, y, q, q_n;
  hs_state_t st;
  int   checks = 0, failures = 0;
  int   n_start = 0, n_end_y_high = 0, n_end_y_low = 0;
  int   n_y_rise_x_low = 0, n_x_rise_y_high = 0;

  handshake_sampler dut (.x(x), .y(y), .q(q), .q_n(q_n));

  task automatic step(logic x_i, logic y_i);
    int nxt;
    logic q_exp;
    if (!y && y_i && x)   n_start++;
    if (!y && y_i && !x)  n_y_rise_x_low++;
    if (!x && x_i && y)   n_x_rise_y_high++;
    if (x && !x_i && hs_output(st)) begin
      if (y) n_end_y_high++; else n_end_y_low++;
    end
    x = x_i;
    y = y_i;
    #5;
    nxt = hs_settle(st, x_i, y_i);
    checks++;
    if (nxt < 0) begin
      failures++;
      $display("FAIL t=%0t: input change not allowed by the flow table", $time);
    end else begin
      st = hs_state_t'(nxt);
      q_exp = hs_output(st);
      if (q !== q_exp || q_n !== ~q_exp) begin
        failures++;
        $display("FAIL t=%0t x=%0b y=%0b: q=%0b, expected %0b (state %0d)",
                 $time, x_i, y_i, q, q_exp, int'(st));
      end
    end
  endtask

  initial begin
    x = 1'b0;
    y = 1'b0;
    #5;
    st = HS_S1;
    // The sequence of the timing example: request, acknowledge edge starts
    // the operation, acknowledge drops, request drops ends it, acknowledge
    // rises without request, then the request returns while acknowledge is
    // high: no new start.
    step(1'b1, 1'b0);
    step(1'b1, 1'b1);
    step(1'b1, 1'b0);
    step(1'b0, 1'b0);
    step(1'b0, 1'b1);
    step(1'b1, 1'b1);
    step(1'b1, 1'b0);
    step(1'b1, 1'b1);    // new start
    step(1'b0, 1'b1);    // end with acknowledge high
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(1) == 0) step(~x, y);
      else                        step(x, ~y);
    end
    checks++;
    if (n_start == 0 || n_end_y_high == 0 || n_end_y_low == 0 ||
        n_y_rise_x_low == 0 || n_x_rise_y_high == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("handshake_sampler_tb: starts=%0d ends y-high/y-low=%0d/%0d y-rise-no-request=%0d request-while-y-high=%0d",
             n_start, n_end_y_high, n_end_y_low, n_y_rise_x_low, n_x_rise_y_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
