// tb_theta_counter: steps theta_counter with random gaps in the load signal
// and checks the angle sequence 0, 5, ..., 175, 0, ..., the wrap flag on
// 175 only, and that the angle holds while ld is low. Three full sweeps.
module tb_theta_counter;
  logic clk = 0, rst, ld, wrap;
  logic [7:0] theta;
  int checks = 0, failures = 0, expect_theta, wraps = 0;

  theta_counter dut (.clk, .rst, .ld, .theta, .wrap);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ld = 0;
    @(posedge clk); #1; rst = 0;
    expect_theta = 0;
    while (wraps < 3) begin
      ld = ($urandom_range(0, 1) == 1);
      checks++;
      if (theta !== 8'(expect_theta)) begin failures++; $display("theta=%0d expected %0d", theta, expect_theta); end
      checks++;
      if (wrap !== (expect_theta == 175)) begin failures++; $display("wrap=%0b at theta %0d", wrap, theta); end
      @(posedge clk); #1;
      if (ld) begin
        if (expect_theta == 175) begin expect_theta = 0; wraps++; end
        else expect_theta += 5;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
