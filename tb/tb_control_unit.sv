// tb_control_unit: runs control_unit through two full sweeps with software
// models of the theta and pixel counters answering its Ld1/Ld2 steps.
// Checks, cycle by cycle, the state order S1..S6 per vote, the nine control
// signals expected in each state (LdC/LdS/LdX/LdY in S2, LdR in S3, LdA in
// S5, Wren and Ld1 in S6, Ld2 in S6 of the last angle), that the machine
// idles without start, that a sweep is 216 votes and 1296 busy clocks, and
// that done pulses once, in the clock after the last S6.
module tb_control_unit;
  import hough_pkg::*;
  logic clk = 0, rst, start, theta_wrap, xy_done, busy, done;
  state_t state;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  int m_theta, m_xy;

  control_unit dut (.clk, .rst, .start, .theta_wrap, .xy_done, .state, .ctrl, .busy, .done);

  always #5 clk = ~clk;

  assign theta_wrap = (m_theta == 175);
  assign xy_done    = (m_xy == 5);

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  function automatic ctrl_t expected_ctrl(input state_t s, input bit wrap);
    ctrl_t c = '0;
    c.ldc = (s == S2_LOAD); c.lds = (s == S2_LOAD);
    c.ldx = (s == S2_LOAD); c.ldy = (s == S2_LOAD);
    c.ldr = (s == S3_RHO);  c.lda = (s == S5_ACC);
    c.wren = (s == S6_WRITE); c.ld1 = (s == S6_WRITE);
    c.ld2 = (s == S6_WRITE) && wrap;
    return c;
  endfunction

  // Counter models, stepped by the unit's load signals.
  always @(posedge clk) begin
    if (rst) begin m_theta <= 0; m_xy <= 0; end
    else begin
      if (ctrl.ld1) m_theta <= (m_theta == 175) ? 0 : m_theta + 5;
      if (ctrl.ld2) m_xy    <= (m_xy == 5) ? 0 : m_xy + 1;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int votes, busy_clks;
    state_t exp_state;
    rst = 1; start = 0;
    @(posedge clk); #1; rst = 0;
    repeat (5) begin
      check("idle without start", state == S0_IDLE && !busy && !done && ctrl == '0);
      @(posedge clk); #1;
    end
    for (int sweep = 0; sweep < 2; sweep++) begin
      start = 1;
      @(posedge clk); #1;
      start = (sweep == 1);  // second sweep: start held high throughout
      votes = 0; busy_clks = 0;
      exp_state = S1_ADDR;
      while (state != S7_DONE && busy_clks < 2000) begin
        check($sformatf("state %0d expected %0d", state, exp_state), state == exp_state);
        check($sformatf("ctrl in state %0d", state), ctrl == expected_ctrl(state, theta_wrap));
        check("busy high during sweep", busy && !done);
        if (state == S6_WRITE) votes++;
        busy_clks++;
        exp_state = (state == S6_WRITE) ? S1_ADDR : state_t'(state + 1);
        @(posedge clk); #1;
      end
      check($sformatf("votes %0d expected 216", votes), votes == 216);
      check($sformatf("busy clocks %0d expected 1296", busy_clks), busy_clks == 1296);
      check("done pulse", state == S7_DONE && done && !busy && ctrl == '0);
      check("counters wrapped", m_theta == 0 && m_xy == 0);
      start = 0;
      @(posedge clk); #1;
      check("back to idle", state == S0_IDLE && !done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
