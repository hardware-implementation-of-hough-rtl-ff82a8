// tb_hough_top: end-to-end run of the Hough engine at its default
// parameters (6 edge pixels of a 6x6 image, 36 angles, 256-word RAMs),
// with a 50 MHz clock.
//
// Two complete sweeps are run. During each, every vote (the clock in
// state S6) is checked against a reference model: the (theta, pixel) pair
// must follow the order pixel-major, angle-minor; Rho must equal
// x*round(127 cos) + y*round(127 sin); Acc must hold the model's vote count
// at the low 8 bits of rho. The angle 60 on pixel (3,1) must show
// COS=64, SIN=110, Rho=302. Each sweep must take 1296 busy clocks
// (25.92 us). After each sweep both RAMs are read out and compared with the
// model; the second sweep adds to the first, as the RAMs are not cleared.
// The count of each mechanism is printed and one that never happened is a
// failure: angle wrap to 0, pixel step, last-pixel wrap with done, a vote
// on an already voted word, two different rho values meeting in one word,
// a negative rho, and readout.
module tb_hough_top;
  timeunit 1ns; timeprecision 1ps;
  import hough_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst, start, busy, done;
  logic [7:0] rd_addr, theta, xy, x_out, y_out;
  logic [15:0] acc_rd, t_out, acc;
  logic signed [7:0] cos_out, sin_out;
  logic signed [15:0] rho;
  state_t state;
  int checks = 0, failures = 0;

  int votes [256];
  int last_t [256];
  int first_rho [256];
  bit rho_seen [256];
  int n_theta_wrap = 0, n_pixel_step = 0, n_done = 0, n_revote = 0;
  int n_alias = 0, n_negative = 0, n_readout = 0, n_example = 0;

  hough_top dut (.clk, .rst, .start, .rd_addr, .busy, .done, .acc_rd, .t_out,
                 .state, .theta, .xy, .cos_out, .sin_out, .x_out, .y_out, .rho, .acc);

  always #10 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("%0t: %s: got %0d expected %0d", $time, what, got, exp); end
  endtask

  task automatic mechanism(input string what, input int n);
    $display("mechanism %-28s %0d", what, n);
    checks++;
    if (n == 0) begin failures++; $display("  never happened"); end
  endtask

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep();
    int busy_clks = 0, exp_t = 0, exp_p = 0, exp_rho, a;
    realtime t0;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    t0 = $realtime;
    while (!done && busy_clks < 5000) begin
      if (state == S3_RHO) begin
        // operands loaded in S2
        check("cos", int'(cos_out), trig127(exp_t, 0));
        check("sin", int'(sin_out), trig127(exp_t, 1));
        check("x", int'(x_out), pix_x(exp_p));
        check("y", int'(y_out), pix_y(exp_p));
      end
      if (state == S6_WRITE) begin
        exp_rho = pix_x(exp_p) * trig127(exp_t, 0) + pix_y(exp_p) * trig127(exp_t, 1);
        a = exp_rho & 255;
        check("theta", int'(theta), exp_t);
        check("xy", int'(xy), exp_p);
        check("rho", int'(rho), exp_rho);
        check("acc", int'(acc), votes[a]);
        if (exp_t == 60 && exp_p == 2) begin
          n_example++;
          check("example cos 60", int'(cos_out), 64);
          check("example sin 60", int'(sin_out), 110);
          check("example rho", int'(rho), 302);
        end
        if (votes[a] > 0) n_revote++;
        if (rho_seen[a] && first_rho[a] != exp_rho) n_alias++;
        if (!rho_seen[a]) begin rho_seen[a] = 1; first_rho[a] = exp_rho; end
        if (exp_rho < 0) n_negative++;
        votes[a]++; last_t[a] = exp_t;
        if (exp_t == 175) begin
          n_theta_wrap++;
          exp_t = 0;
          if (exp_p == 5) exp_p = 0; else begin exp_p++; n_pixel_step++; end
        end else exp_t += 5;
      end
      busy_clks++;
      @(posedge clk); #1;
    end
    check("busy clocks per sweep", busy_clks, 1296);
    check("sweep time in ns", int'(($realtime - t0)), 1296 * 20);
    check("done", int'(done), 1);
    n_done++;
    check("counters back at 0", int'(theta) + int'(xy), 0);
    @(posedge clk); #1;
    check("idle after done", int'(state), int'(S0_IDLE));
    for (int i = 0; i < 256; i++) begin
      rd_addr = 8'(i);
      @(posedge clk); #1;
      check($sformatf("Param_R[%0d]", i), int'(acc_rd), votes[i]);
      check($sformatf("Param_T[%0d]", i), int'(t_out), last_t[i]);
      n_readout++;
    end
  endtask

  initial begin
    int best;
    foreach (votes[i]) begin votes[i] = 0; last_t[i] = 0; rho_seen[i] = 0; first_rho[i] = 0; end
    rst = 1; start = 0; rd_addr = 0;
    repeat (2) @(posedge clk);
    #1; rst = 0;
    @(posedge clk); #1;
    sweep();
    // The four collinear pixels (x + y = 4) meet at theta 45, rho 360:
    // word 360 mod 256 = 104 holds at least their four votes and angle 45.
    check("line votes at rho 360", int'(votes[104] >= 4), 1);
    check("line angle at rho 360", last_t[104], 45);
    best = 0;
    foreach (votes[i]) if (votes[i] > best) best = votes[i];
    $display("largest vote count after one sweep: %0d (word 104 holds %0d, theta %0d)",
             best, votes[104], last_t[104]);
    sweep();
    mechanism("angle wrap 175 -> 0", n_theta_wrap);
    mechanism("pixel step", n_pixel_step);
    mechanism("sweep done", n_done);
    mechanism("vote on a voted word", n_revote);
    mechanism("rho aliasing in a word", n_alias);
    mechanism("negative rho", n_negative);
    mechanism("readout", n_readout);
    mechanism("worked example 60 deg", n_example);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
