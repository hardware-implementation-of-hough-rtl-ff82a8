// tb_pixel_counter: steps pixel_counter with random gaps in the load signal
// and checks the index sequence 0..5, 0, ..., the done flag on 5 only and
// holding while ld is low. Four full passes.
module tb_pixel_counter;
  logic clk = 0, rst, ld, done;
  logic [7:0] xy;
  int checks = 0, failures = 0, expect_xy, passes = 0;

  pixel_counter dut (.clk, .rst, .ld, .xy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ld = 0;
    @(posedge clk); #1; rst = 0;
    expect_xy = 0;
    while (passes < 4) begin
      ld = ($urandom_range(0, 1) == 1);
      checks++;
      if (xy !== 8'(expect_xy)) begin failures++; $display("xy=%0d expected %0d", xy, expect_xy); end
      checks++;
      if (done !== (expect_xy == 5)) begin failures++; $display("done=%0b at xy %0d", done, xy); end
      @(posedge clk); #1;
      if (ld) begin
        if (expect_xy == 5) begin expect_xy = 0; passes++; end
        else expect_xy++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
