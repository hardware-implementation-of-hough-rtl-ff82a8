// tb_load_reg: checks that load_reg takes d only when ld is high, holds
// otherwise and clears on reset, against a software copy of the register,
// over 500 random cycles.
module tb_load_reg;
  logic clk = 0, rst, ld;
  logic [11:0] d, q, model;
  int checks = 0, failures = 0;

  load_reg #(.W(12)) dut (.clk, .rst, .ld, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ld = 0; d = '0;
    @(posedge clk); #1;
    rst = 0; model = '0;
    checks++; if (q !== 12'd0) begin failures++; $display("reset value %h", q); end
    for (int i = 0; i < 500; i++) begin
      ld = ($urandom_range(0, 2) == 0);
      d  = 12'($urandom);
      @(posedge clk); #1;
      if (ld) model = d;
      checks++;
      if (q !== model) begin failures++; $display("cycle %0d q=%h expected %h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
