// hough_top: Hough transform engine for straight-line detection.
//
// The edge pixels of an image sit, as (x, y) pairs, in two ROMs. For each
// pixel in turn the engine sweeps theta over 0, 5, ..., 175 degrees, forms
// rho = x*cos(theta) + y*sin(theta) with cos and sin scaled by 127, and
// casts one vote at rho: the vote count in Param_R at address rho is read,
// incremented and written back, and theta is written to Param_T at the same
// address. Collinear pixels give the same integer rho at the line's angle,
// so the word with the most votes names the line: its address is rho, its
// Param_T word is theta.
//
// Parts: control_unit (state machine, six clocks per vote), theta_counter
// and pixel_counter (the loop counters) and hough_datapath (ROMs, operand
// registers, multiply-add, RAMs). With the default 6 pixels and 36 angles a
// sweep is 1296 busy clocks from start to the done pulse (25.92 us at
// 50 MHz).
//
// Interface: pulse start in idle; busy is high during the sweep and done
// pulses once at its end. While not busy, rd_addr reads both RAMs, data on
// acc_rd and t_out one clock later. The other outputs show the datapath
// registers for observation. Synchronous active-high reset of the counters,
// the state and the registers; RAM contents are not reset.
module hough_top
  import hough_pkg::*;
#(
  parameter int unsigned THETA_STEP = 5,
  parameter int unsigned THETA_WRAP = 180,
  parameter int unsigned LAST_PIXEL = 5,
  parameter int unsigned RHO_AW     = 8,
  parameter string       X_HEX      = "rtl/x_pixel.hex",
  parameter string       Y_HEX      = "rtl/y_pixel.hex"
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic        [RHO_AW-1:0]  rd_addr,
  output logic                      busy,
  output logic                      done,
  output logic        [VOTE_W-1:0]  acc_rd,
  output logic        [VOTE_W-1:0]  t_out,
  output state_t                    state,
  output logic        [THETA_W-1:0] theta,
  output logic        [PIX_W-1:0]   xy,
  output logic signed [TRIG_W-1:0]  cos_out,
  output logic signed [TRIG_W-1:0]  sin_out,
  output logic        [PIX_W-1:0]   x_out,
  output logic        [PIX_W-1:0]   y_out,
  output logic signed [RHO_W-1:0]   rho,
  output logic        [VOTE_W-1:0]  acc
);

  ctrl_t ctrl;
  logic  theta_wrap, xy_done;

  control_unit u_ctrl (
    .clk, .rst, .start, .theta_wrap, .xy_done,
    .state, .ctrl, .busy, .done
  );

  theta_counter #(.W(THETA_W), .STEP(THETA_STEP), .WRAP(THETA_WRAP)) u_theta (
    .clk, .rst, .ld(ctrl.ld1), .theta, .wrap(theta_wrap)
  );

  pixel_counter #(.W(PIX_W), .LAST(LAST_PIXEL)) u_xy (
    .clk, .rst, .ld(ctrl.ld2), .xy, .done(xy_done)
  );

  hough_datapath #(
    .RHO_AW(RHO_AW), .X_HEX(X_HEX), .Y_HEX(Y_HEX)
  ) u_dp (
    .clk, .rst, .ctrl, .busy, .theta, .xy, .rd_addr,
    .cos_out, .sin_out, .x_out, .y_out, .rho, .acc, .acc_rd, .t_out
  );

endmodule
