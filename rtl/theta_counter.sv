// theta_counter: the angle register of the Hough engine.
//
// Theta starts at 0 and, each time ld (Ld1) is high, advances by STEP
// degrees (5). When the advanced value would reach WRAP (180) the register
// returns to 0 instead, so the angles swept are 0, 5, ..., 175: 36 angles,
// the half turn that a (rho, theta) line needs. The structure (register,
// hold mux on the load signal, +5 adder, compare with 180 selecting 0) is
// the design's; comparing the advanced value rather than the held one, so
// that 180 itself is skipped, is this implementation's reading.
//
// wrap is high, combinationally, while the held angle is the last one
// (theta + STEP == WRAP); the pixel counter steps on it.
// Timing: theta changes on the clock edge ending a cycle with ld high.
module theta_counter #(
  parameter int unsigned W    = 8,
  parameter int unsigned STEP = 5,
  parameter int unsigned WRAP = 180
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  output logic [W-1:0] theta,
  output logic         wrap
);

  logic [W:0] advanced;

  assign advanced = {1'b0, theta} + (W+1)'(STEP);
  assign wrap     = (advanced >= (W+1)'(WRAP));

  always_ff @(posedge clk) begin
    if (rst)     theta <= '0;
    else if (ld) theta <= wrap ? '0 : advanced[W-1:0];
  end

endmodule
