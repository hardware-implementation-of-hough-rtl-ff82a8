// tb_sync_rom: loads the X and Y pixel tables of the 6x6 test image into
// two sync_rom instances and reads every word against the image held in
// the testbench's reference package (pixel i at word i, zeros after), then
// checks the one-clock read latency.
module tb_sync_rom;
  import tb_ref_pkg::*;
  logic clk = 0;
  logic [7:0] addr, d_x, d_y;
  int checks = 0, failures = 0;

  sync_rom #(.INIT_FILE("rtl/x_pixel.hex")) u_x (.clk, .addr, .data(d_x));
  sync_rom #(.INIT_FILE("rtl/y_pixel.hex")) u_y (.clk, .addr, .data(d_y));

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
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
      addr = 8'(a);
      @(posedge clk); #1;
      check($sformatf("x[%0d]", a), int'(d_x), pix_x(a));
      check($sformatf("y[%0d]", a), int'(d_y), pix_y(a));
    end
    // Latency: the word changes only at the clock edge after the address.
    addr = 8'd5;
    @(posedge clk); #1;
    addr = 8'd4;
    #2;
    check("x[5] held before the edge", int'(d_x), 5);
    check("y[5] held before the edge", int'(d_y), 5);
    @(posedge clk); #1;
    check("x[4] after the edge", int'(d_x), 3);
    check("y[4] after the edge", int'(d_y), 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
