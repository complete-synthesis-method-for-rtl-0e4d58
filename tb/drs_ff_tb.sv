// drs_ff_tb -- self-checking test of the DRS (Data-Reset-Set) flip-flop.
//
// One of d, c, s, r changes per step, never leaving s and r high together.
// After each step q and q_n are compared with a positive-edge D flip-flop
// with asynchronous set and reset: s forces 1, r forces 0, otherwise q takes
// d at each rising edge of c and holds.  Coverage counters make sure that
// set and reset were applied with the clock both low and high, that the
// output held the forced value after set or reset was released, and that
// clocked captures of both values happened.
module drs_ff_tb;
  import async_ref_pkg::*;

  logic d, c, s, r, q, q_n;
  logic q_model;
  int   checks = 0, failures = 0;
  int   n_set_clk_low = 0, n_set_clk_high = 0;
  int   n_reset_clk_low = 0, n_reset_clk_high = 0;
  int   n_capture0 = 0, n_capture1 = 0, n_release = 0;

  drs_ff dut (.d(d), .c(c), .s(s), .r(r), .q(q), .q_n(q_n));

  task automatic step(logic d_i, logic c_i, logic s_i, logic r_i);
    logic c_prev;
    c_prev = c;
    if (s_i && !s) begin if (c) n_set_clk_high++;   else n_set_clk_low++;   end
    if (r_i && !r) begin if (c) n_reset_clk_high++; else n_reset_clk_low++; end
    if ((s && !s_i) || (r && !r_i)) n_release++;
    if (!c_prev && c_i && !s_i && !r_i) begin
      if (d_i) n_capture1++; else n_capture0++;
    end
    d = d_i;
    c = c_i;
    s = s_i;
    r = r_i;
    #5;
    q_model = dff_next(q_model, c_prev, c_i, d_i, s_i, r_i);
    checks++;
    if (q !== q_model || q_n !== ~q_model) begin
      failures++;
      $display("FAIL t=%0t d=%0b c=%0b s=%0b r=%0b: q=%0b q_n=%0b, expected %0b",
               $time, d_i, c_i, s_i, r_i, q, q_n, q_model);
    end
  endtask

  initial begin
    d = 1'b0;
    c = 1'b0;
    s = 1'b0;
    r = 1'b1;            // asynchronous reset defines the output
    #5;
    q_model = 1'b0;
    // Directed: reset released with clock low, clocked capture of 1.
    step(1'b1, 1'b0, 1'b0, 1'b0);
    step(1'b1, 1'b1, 1'b0, 1'b0);          // q = 1
    step(1'b1, 1'b1, 1'b0, 1'b1);          // reset with clock high
    step(1'b1, 1'b1, 1'b0, 1'b0);          // released: holds 0
    step(1'b0, 1'b1, 1'b0, 1'b0);
    step(1'b0, 1'b1, 1'b1, 1'b0);          // set with clock high
    step(1'b0, 1'b1, 1'b0, 1'b0);          // released: holds 1
    step(1'b0, 1'b0, 1'b0, 1'b0);
    step(1'b0, 1'b1, 1'b0, 1'b0);          // capture 0
    step(1'b0, 1'b0, 1'b0, 1'b0);
    step(1'b0, 1'b0, 1'b1, 1'b0);          // set with clock low
    step(1'b0, 1'b0, 1'b0, 1'b0);          // released: holds 1
    step(1'b0, 1'b1, 1'b0, 1'b0);          // capture 0
    for (int i = 0; i < 4000; i++) begin
      case ($urandom_range(3))
        0: step(~d, c, s, r);
        1: step(d, ~c, s, r);
        2: if (!r) step(d, c, ~s, r);
        default: if (!s) step(d, c, s, ~r);
      endcase
    end
    checks++;
    if (n_set_clk_low == 0 || n_set_clk_high == 0 || n_reset_clk_low == 0 ||
        n_reset_clk_high == 0 || n_capture0 == 0 || n_capture1 == 0 || n_release == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("drs_ff_tb: set lo/hi=%0d/%0d reset lo/hi=%0d/%0d capture 0/1=%0d/%0d releases=%0d",
             n_set_clk_low, n_set_clk_high, n_reset_clk_low, n_reset_clk_high,
             n_capture0, n_capture1, n_release);
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
