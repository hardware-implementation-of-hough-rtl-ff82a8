// tb_hough_datapath: drives hough_datapath with the six-step vote sequence
// (address, load operands, load Rho, read, load Acc, write) for 300 random
// (theta, pixel) pairs, theta any degree 0..180 and pixel 0..7. After each
// step it checks the COS/SIN/X/Y registers, Rho and Acc against reference
// arithmetic; a software vote table (count and last theta per low 8 bits of
// rho) is kept alongside. Finally both RAMs are read out through rd_addr
// with busy low and compared word by word.
module tb_hough_datapath;
  import hough_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst, busy;
  ctrl_t ctrl;
  logic [7:0] theta, xy, rd_addr;
  logic signed [7:0] cos_out, sin_out;
  logic [7:0] x_out, y_out;
  logic signed [15:0] rho;
  logic [15:0] acc, acc_rd, t_out;
  int checks = 0, failures = 0;
  int votes [256];
  int last_t [256];

  hough_datapath dut (.clk, .rst, .ctrl, .busy, .theta, .xy, .rd_addr,
                      .cos_out, .sin_out, .x_out, .y_out, .rho, .acc, .acc_rd, .t_out);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic tick(input ctrl_t c);
    ctrl = c;
    @(posedge clk); #1;
    ctrl = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_t c;
    int t, p, exp_rho, a;
    foreach (votes[i]) begin votes[i] = 0; last_t[i] = 0; end
    rst = 1; busy = 0; ctrl = '0; theta = 0; xy = 0; rd_addr = 0;
    @(posedge clk); #1; rst = 0;
    busy = 1;
    for (int n = 0; n < 300; n++) begin
      t = $urandom_range(0, 180);
      p = $urandom_range(0, 7);
      // the (3,1) pixel at 60 degrees, the worked example, comes first
      if (n == 0) begin t = 60; p = 2; end
      theta = 8'(t); xy = 8'(p);
      tick('0);                                   // S1
      c = '0; c.ldc = 1; c.lds = 1; c.ldx = 1; c.ldy = 1;
      tick(c);                                    // S2
      check("cos", int'(cos_out), trig127(t, 0));
      check("sin", int'(sin_out), trig127(t, 1));
      check("x",   int'(x_out),   pix_x(p));
      check("y",   int'(y_out),   pix_y(p));
      c = '0; c.ldr = 1;
      tick(c);                                    // S3
      exp_rho = pix_x(p) * trig127(t, 0) + pix_y(p) * trig127(t, 1);
      check("rho", int'(rho), exp_rho);
      if (n == 0) check("worked example rho", int'(rho), 302);
      a = exp_rho & 255;
      tick('0);                                   // S4
      c = '0; c.lda = 1;
      tick(c);                                    // S5
      check("acc", int'(acc), votes[a]);
      c = '0; c.wren = 1; c.ld1 = 1;
      tick(c);                                    // S6
      votes[a]++; last_t[a] = t;
    end
    busy = 0;
    for (int i = 0; i < 256; i++) begin
      rd_addr = 8'(i);
      @(posedge clk); #1;
      check($sformatf("Param_R[%0d]", i), int'(acc_rd), votes[i]);
      check($sformatf("Param_T[%0d]", i), int'(t_out), last_t[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
