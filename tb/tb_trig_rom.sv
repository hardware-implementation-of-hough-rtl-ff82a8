// tb_trig_rom: reads all 256 words of the cosine and sine tables of
// trig_rom and compares them with round(127*cos) and round(127*sin)
// computed in the testbench's reference package; checks the worked values
// cos 60 = 64, sin 60 = 110, cos 120 = -64, sin 30 = 64 and the one-clock
// read latency.
module tb_trig_rom;
  import tb_ref_pkg::*;
  logic clk = 0;
  logic [7:0] addr, d_cos, d_sin;
  int checks = 0, failures = 0;

  trig_rom #(.IS_SIN(1'b0)) u_cos (.clk, .addr, .data(d_cos));
  trig_rom #(.IS_SIN(1'b1)) u_sin (.clk, .addr, .data(d_sin));

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic read(input int a);
    addr = 8'(a);
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 8'd0;
    @(posedge clk); #1;
    for (int a = 0; a < 256; a++) begin
      read(a);
      check($sformatf("cos[%0d]", a), int'($signed(d_cos)), trig127(a, 0));
      check($sformatf("sin[%0d]", a), int'($signed(d_sin)), trig127(a, 1));
    end
    read(60);  check("cos 60", int'($signed(d_cos)), 64);  check("sin 60", int'($signed(d_sin)), 110);
    read(120); check("cos 120", int'($signed(d_cos)), -64);
    read(30);  check("sin 30", int'($signed(d_sin)), 64);
    read(180); check("cos 180", int'($signed(d_cos)), -127); check("sin 180", int'($signed(d_sin)), 0);
    // Latency: the word changes only at the clock edge after the address.
    read(60);
    addr = 8'd0;
    #2;
    check("cos 60 held before the edge", int'($signed(d_cos)), 64);
    @(posedge clk); #1;
    check("cos 0 after the edge", int'($signed(d_cos)), 127);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
