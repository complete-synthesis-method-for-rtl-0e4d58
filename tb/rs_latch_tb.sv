// rs_latch_tb -- self-checking test of the RS latch.
//
// Drives a fixed directed sequence (set, hold, reset, hold, set again) and
// then random legal input pairs (never set and reset together), comparing q
// and q_n after each change with Q = S + !R*q.  Ends with the TB_RESULT line;
// a watchdog ends a run that does not finish.
module rs_latch_tb;
  import async_ref_pkg::*;

  logic s, r, q, q_n;
  logic q_model;
  int   checks = 0, failures = 0;
  int   n_set = 0, n_reset = 0, n_hold = 0;

  rs_latch dut (.s(s), .r(r), .q(q), .q_n(q_n));

  task automatic apply(logic s_i, logic r_i);
    s = s_i;
    r = r_i;
    #5;
    q_model = rs_next(s_i, r_i, q_model);
    checks++;
    if (q !== q_model || q_n !== ~q_model) begin
      failures++;
      $display("FAIL s=%0b r=%0b: q=%0b q_n=%0b, expected q=%0b", s_i, r_i, q, q_n, q_model);
    end
    if (s_i) n_set++; else if (r_i) n_reset++; else n_hold++;
  endtask

  initial begin
    s = 1'b0;
    r = 1'b1;      // define the state first
    q_model = 1'b0;
    #5;
    apply(1'b0, 1'b0);
    apply(1'b1, 1'b0);
    apply(1'b0, 1'b0);
    apply(1'b0, 1'b0);
    apply(1'b0, 1'b1);
    apply(1'b0, 1'b0);
    apply(1'b1, 1'b0);
    apply(1'b1, 1'b0);
    apply(1'b0, 1'b0);
    for (int i = 0; i < 500; i++) begin
      case ($urandom_range(2))
        0:       apply(1'b1, 1'b0);
        1:       apply(1'b0, 1'b1);
        default: apply(1'b0, 1'b0);
      endcase
    end
    checks++;
    if (n_set == 0 || n_reset == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL coverage: set=%0d reset=%0d hold=%0d", n_set, n_reset, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
