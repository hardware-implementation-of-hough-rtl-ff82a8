// tb_sp_ram: checks that every word of sp_ram starts at zero, then runs
// 3000 random read/write cycles against an array model, including the
// read-before-write behaviour (a write shows its old word on rdata) and the
// one-clock read latency. Also performs the read, +1, write-back pattern of
// a vote on one address.
module tb_sp_ram;
  logic clk = 0, we;
  logic [7:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  sp_ram #(.DW(16), .AW(8)) dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic step(input logic w, input int a, input int d);
    logic [15:0] exp;
    we = w; addr = 8'(a); wdata = 16'(d);
    exp = model[a];
    @(posedge clk); #1;
    if (w) model[a] = 16'(d);
    checks++;
    if (rdata !== exp) begin failures++; $display("addr %0d we %0b: rdata=%h expected %h", a, w, rdata, exp); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    we = 0; addr = 0; wdata = 0;
    for (int a = 0; a < 256; a++) step(0, a, 0);
    for (int i = 0; i < 3000; i++)
      step($urandom_range(0, 1), $urandom_range(0, 255), $urandom_range(0, 65535));
    // Read-modify-write of a vote at address 104, three times.
    for (int k = 0; k < 3; k++) begin
      step(0, 104, 0);
      step(1, 104, int'(rdata) + 1);
    end
    step(0, 104, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
