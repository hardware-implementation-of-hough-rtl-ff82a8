// load_reg: register with a load (Ld) input.
//
// The register keeps its value while ld is low and takes d on the rising
// clock edge while ld is high, so a value already held is not overwritten
// before the step that uses it has finished. In the Hough engine six of
// them hold the cosine, sine, X and Y operands, the Rho result and the
// old vote count (Acc). The gating behaviour is the design's; the
// synchronous active-high reset to zero is this implementation's choice.
//
// Timing: q shows d one clock after a cycle with ld high.
module load_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ld) q <= d;
  end

endmodule
