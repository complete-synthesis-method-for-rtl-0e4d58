// d_ff_tb -- self-checking test of the transition D flip-flop.
//
// The clock is brought low and then high once to define the state.  Then
// either d or c changes, one input per step, in a directed opening sequence
// and a long random one.  After each step q and q_n are compared with a
// positive-edge D flip-flop: q takes d at each rising edge of c and holds
// otherwise, in particular while d moves with c high or with c low.  Counts
// of captures and of ignored data changes must all be non-zero.
module d_ff_tb;
  import async_ref_pkg::*;

  logic d, c, q, q_n;
  logic q_model;
  int   checks = 0, failures = 0;
  int   n_capture = 0, n_d_while_high = 0, n_d_while_low = 0;

  d_ff dut (.d(d), .c(c), .q(q), .q_n(q_n));

  task automatic step(logic d_i, logic c_i);
    logic c_prev;
    c_prev = c;
    if (d_i != d) begin
      if (c) n_d_while_high++; else n_d_while_low++;
    end
    if (!c_prev && c_i) n_capture++;
    d = d_i;
    c = c_i;
    #5;
    q_model = dff_next(q_model, c_prev, c_i, d_i, 1'b0, 1'b0);
    checks++;
    if (q !== q_model || q_n !== ~q_model) begin
      failures++;
      $display("FAIL t=%0t d=%0b c=%0b: q=%0b q_n=%0b, expected %0b", $time, d_i, c_i, q, q_n, q_model);
    end
  endtask

  initial begin
    d = 1'b1;
    c = 1'b0;
    #5;
    c = 1'b1;            // first rising edge defines q = 1
    #5;
    q_model = 1'b1;
    step(1'b0, 1'b1);    // data moves while clock high: no change
    step(1'b0, 1'b0);    // master opens
    step(1'b1, 1'b0);    // data moves while clock low: no change at output
    step(1'b0, 1'b0);
    step(1'b0, 1'b1);    // capture 0
    step(1'b1, 1'b1);
    step(1'b1, 1'b0);
    step(1'b1, 1'b1);    // capture 1
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(1) == 0) step(~d, c);
      else                        step(d, ~c);
    end
    checks++;
    if (n_capture == 0 || n_d_while_high == 0 || n_d_while_low == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("d_ff_tb: captures=%0d data changes clock-high=%0d clock-low=%0d",
             n_capture, n_d_while_high, n_d_while_low);
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
