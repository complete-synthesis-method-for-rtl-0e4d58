// dff_async_top_tb -- end-to-end test of the top: the request sampler, the
// D flip-flop and the DRS flip-flop exercised together.
//
// Each step changes one input of one of the three circuits (never both set
// and reset of the DRS cell), lets the circuit settle and compares all six
// outputs with the reference behaviour: the sampler's flow table, a positive
// edge D flip-flop, and a positive-edge D flip-flop with asynchronous set and
// reset.  Every output is checked at every step, so a change on one circuit
// that disturbed another would be caught.  Each mechanism of the method is
// counted and must happen at least once: sampled start and asynchronous end
// of the handshake operation, ignored acknowledge edges, clocked capture in
// both flip-flops, asynchronous set and reset with the clock low and high,
// and holding the forced value after set or reset is released.
module dff_async_top_tb;
  import async_ref_pkg::*;

  logic hs_x, hs_y, hs_q, hs_q_n;
  logic dff_d, dff_c, dff_q, dff_q_n;
  logic drs_d, drs_c, drs_s, drs_r, drs_q, drs_q_n;

  hs_state_t hs_st;
  logic dff_model, drs_model;
  int   checks = 0, failures = 0;

  typedef enum int {
    M_HS_START, M_HS_END, M_HS_Y_IGNORED, M_HS_X_WHILE_Y_HIGH,
    M_DFF_CAPTURE, M_DFF_HOLD,
    M_DRS_SET_LOW, M_DRS_SET_HIGH, M_DRS_RESET_LOW, M_DRS_RESET_HIGH,
    M_DRS_RELEASE_HOLD, M_DRS_CAPTURE, M_COUNT
  } mech_t;
  int mech [M_COUNT];

  dff_async_top dut (.*);

  task automatic check_all();
    int nxt;
    logic hs_exp;
    checks++;
    if (dff_q !== dff_model || dff_q_n !== ~dff_model) begin
      failures++;
      $display("FAIL t=%0t D flip-flop q=%0b expected %0b", $time, dff_q, dff_model);
    end
    checks++;
    if (drs_q !== drs_model || drs_q_n !== ~drs_model) begin
      failures++;
      $display("FAIL t=%0t DRS flip-flop q=%0b expected %0b", $time, drs_q, drs_model);
    end
    nxt = hs_settle(hs_st, hs_x, hs_y);
    checks++;
    if (nxt < 0) begin
      failures++;
      $display("FAIL t=%0t sampler input change not in the flow table", $time);
    end else begin
      hs_st = hs_state_t'(nxt);
      hs_exp = hs_output(hs_st);
      if (hs_q !== hs_exp || hs_q_n !== ~hs_exp) begin
        failures++;
        $display("FAIL t=%0t sampler q=%0b expected %0b", $time, hs_q, hs_exp);
      end
    end
  endtask

  task automatic step_hs(logic x_i, logic y_i);
    logic q_before;
    q_before = hs_output(hs_st);
    if (!hs_y && y_i && hs_x)  mech[M_HS_START]++;
    if (!hs_y && y_i && !hs_x) mech[M_HS_Y_IGNORED]++;
    if (!hs_x && x_i && hs_y)  mech[M_HS_X_WHILE_Y_HIGH]++;
    if (hs_x && !x_i && q_before) mech[M_HS_END]++;
    hs_x = x_i;
    hs_y = y_i;
    #5;
    check_all();
  endtask

  task automatic step_dff(logic d_i, logic c_i);
    logic c_prev;
    c_prev = dff_c;
    if (!c_prev && c_i) mech[M_DFF_CAPTURE]++;
    if (d_i != dff_d)   mech[M_DFF_HOLD]++;
    dff_d = d_i;
    dff_c = c_i;
    #5;
    dff_model = dff_next(dff_model, c_prev, c_i, d_i, 1'b0, 1'b0);
    check_all();
  endtask

  task automatic step_drs(logic d_i, logic c_i, logic s_i, logic r_i);
    logic c_prev;
    c_prev = drs_c;
    if (s_i && !drs_s) begin if (drs_c) mech[M_DRS_SET_HIGH]++;   else mech[M_DRS_SET_LOW]++;   end
    if (r_i && !drs_r) begin if (drs_c) mech[M_DRS_RESET_HIGH]++; else mech[M_DRS_RESET_LOW]++; end
    if ((drs_s && !s_i) || (drs_r && !r_i)) mech[M_DRS_RELEASE_HOLD]++;
    if (!c_prev && c_i && !s_i && !r_i) mech[M_DRS_CAPTURE]++;
    drs_d = d_i;
    drs_c = c_i;
    drs_s = s_i;
    drs_r = r_i;
    #5;
    drs_model = dff_next(drs_model, c_prev, c_i, d_i, s_i, r_i);
    check_all();
  endtask

  initial begin
    foreach (mech[i]) mech[i] = 0;
    // Define every state: request low clears the sampler, a clock edge
    // loads the D flip-flop, reset clears the DRS flip-flop.
    hs_x  = 1'b0; hs_y  = 1'b0;
    dff_d = 1'b0; dff_c = 1'b0;
    drs_d = 1'b0; drs_c = 1'b0; drs_s = 1'b0; drs_r = 1'b1;
    #5;
    dff_c = 1'b1;
    #5;
    hs_st = HS_S1;
    dff_model = 1'b0;
    drs_model = 1'b0;
    step_drs(1'b0, 1'b0, 1'b0, 1'b0);
    // One complete handshake: request, sampled start, acknowledge drops,
    // request drops (asynchronous end).
    step_hs(1'b1, 1'b0);
    step_hs(1'b1, 1'b1);
    step_hs(1'b1, 1'b0);
    step_hs(1'b0, 1'b0);
    // Random interleaving of all three circuits.
    for (int i = 0; i < 6000; i++) begin
      case ($urandom_range(7))
        0: step_hs(~hs_x, hs_y);
        1: step_hs(hs_x, ~hs_y);
        2: step_dff(~dff_d, dff_c);
        3: step_dff(dff_d, ~dff_c);
        4: step_drs(~drs_d, drs_c, drs_s, drs_r);
        5: step_drs(drs_d, ~drs_c, drs_s, drs_r);
        6: if (!drs_r) step_drs(drs_d, drs_c, ~drs_s, drs_r);
        default: if (!drs_s) step_drs(drs_d, drs_c, drs_s, ~drs_r);
      endcase
    end
    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      $display("mechanism %-20s happened %0d times", mech_t'(m), mech[m]);
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_t'(m));
      end
    end
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
