// sp_ram: single-port RAM with registered read, used for Param_R (the vote
// count per rho) and Param_T (the angle of the latest vote per rho).
//
// 2**AW words of DW bits (16x256 in the design). One address serves both
// the write and the read: on a rising edge with we high the word at addr
// takes wdata; rdata always shows, one clock later, the word that was at
// addr before that edge (read-before-write). All words start at zero, as a
// block RAM configured at power-up does; the design never clears them, so
// a second run adds to the first one's votes.
module sp_ram #(
  parameter int unsigned DW = 16,
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
