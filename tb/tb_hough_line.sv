// tb_hough_line: line detection on the 6x6 test image with 11-bit RAM
// addresses (2048 words), enough for every rho of this image (-635..898)
// to have its own word.
//
// After one sweep the testbench reads all 2048 words of Param_R and
// Param_T and looks for the word with the most votes. The four collinear
// pixels (1,3) (2,2) (3,1) (4,0) lie on x + y = 4, whose normal is at 45
// degrees at distance 4/sqrt(2): rho = 4 * round(127 * cos 45) = 360. The
// peak must be word 360 alone, with 4 votes and angle 45. The whole vote
// table is also compared with a reference model, and the sweep must take
// 1296 busy clocks.
module tb_hough_line;
  import tb_ref_pkg::*;

  localparam int AW = 11;
  localparam int N  = 1 << AW;

  logic clk = 0, rst, start, busy, done;
  logic [AW-1:0] rd_addr;
  logic [15:0] acc_rd, t_out;
  int checks = 0, failures = 0;
  int votes [N];
  int last_t [N];

  hough_top #(.RHO_AW(AW)) dut (
    .clk, .rst, .start, .rd_addr, .busy, .done, .acc_rd, .t_out,
    .state(), .theta(), .xy(), .cos_out(), .sin_out(), .x_out(), .y_out(), .rho(), .acc()
  );

  always #10 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int busy_clks = 0, best = -1, best_addr = -1, n_best = 0, rho;
    foreach (votes[i]) begin votes[i] = 0; last_t[i] = 0; end
    for (int p = 0; p < 6; p++)
      for (int t = 0; t < 180; t += 5) begin
        rho = pix_x(p) * trig127(t, 0) + pix_y(p) * trig127(t, 1);
        votes[rho & (N - 1)]++;
        last_t[rho & (N - 1)] = t;
      end
    rst = 1; start = 0; rd_addr = '0;
    repeat (2) @(posedge clk);
    #1; rst = 0;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    while (!done && busy_clks < 5000) begin
      busy_clks++;
      @(posedge clk); #1;
    end
    check("busy clocks", busy_clks, 1296);
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) begin
      rd_addr = AW'(i);
      @(posedge clk); #1;
      check($sformatf("Param_R[%0d]", i), int'(acc_rd), votes[i]);
      check($sformatf("Param_T[%0d]", i), int'(t_out), last_t[i]);
      if (int'(acc_rd) > best) begin best = int'(acc_rd); best_addr = i; n_best = 1; end
      else if (int'(acc_rd) == best) n_best++;
      if (i == 360) check("angle of the line", int'(t_out), 45);
    end
    $display("peak: word %0d with %0d votes (%0d word(s) at the peak)", best_addr, best, n_best);
    check("peak word", best_addr, 360);
    check("peak votes", best, 4);
    check("peak unique", n_best, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
