// rho_unit: rho = x*cos(theta) + y*sin(theta), in integers.
//
// x and y are unsigned 8-bit pixel coordinates; cos and sin are signed
// 8-bit values scaled by 127. Each product is formed as a 16-bit signed
// number and the two are added into a 16-bit signed rho, the widths shown
// on the design's detail diagram. The result is exact while
// |x*cos + y*sin| < 32768, which holds for coordinates up to 128; larger
// sums wrap. Combinational; the Rho register after it captures the result.
module rho_unit
  import hough_pkg::*;
(
  input  logic        [PIX_W-1:0]  x,
  input  logic        [PIX_W-1:0]  y,
  input  logic signed [TRIG_W-1:0] cos_v,
  input  logic signed [TRIG_W-1:0] sin_v,
  output logic signed [RHO_W-1:0]  rho
);

  logic signed [RHO_W-1:0] px, py;

  always_comb begin
    px  = RHO_W'($signed({1'b0, x}) * cos_v);
    py  = RHO_W'($signed({1'b0, y}) * sin_v);
    rho = px + py;
  end

endmodule
