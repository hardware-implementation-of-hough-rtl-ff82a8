// tb_rho_unit: checks rho = x*cos + y*sin on the worked example
// (x=3, y=1, cos=64, sin=110 -> 302), on the corners of the operand range
// and on 2000 random operands with x, y up to 128 (where the 16-bit result
// is exact), against integer arithmetic.
module tb_rho_unit;
  logic [7:0] x, y;
  logic signed [7:0] cos_v, sin_v;
  logic signed [15:0] rho;
  int checks = 0, failures = 0;

  rho_unit dut (.x, .y, .cos_v, .sin_v, .rho);

  task automatic apply(input int xi, input int yi, input int c, input int s);
    int exp;
    x = 8'(xi); y = 8'(yi); cos_v = 8'(c); sin_v = 8'(s);
    #1;
    exp = xi * c + yi * s;
    checks++;
    if (int'(rho) != exp) begin
      failures++;
      $display("x=%0d y=%0d cos=%0d sin=%0d: rho=%0d expected %0d", xi, yi, c, s, rho, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(3, 1, 64, 110);
    apply(0, 0, -128, -128);
    apply(128, 128, -128, -128);
    apply(128, 128, 127, 127);
    apply(5, 5, -127, 0);
    for (int i = 0; i < 2000; i++)
      apply($urandom_range(0, 128), $urandom_range(0, 128),
            $urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
