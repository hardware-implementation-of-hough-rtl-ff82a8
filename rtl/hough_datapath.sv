// hough_datapath: the datapath unit of the Hough engine.
//
// theta addresses the cosine and sine ROMs (trig_rom) and XY the X and Y
// pixel ROMs (sync_rom, loaded from X_HEX / Y_HEX); all four read
// registered. On LdC/LdS/LdX/LdY the four ROM words enter the COS, SIN, X
// and Y registers; on LdR the Rho register takes X*COS + Y*SIN
// (rho_unit). Rho is the address of two RAMs: Param_R, the vote count per
// rho, and Param_T, the angle of the latest vote per rho. On LdA the Acc
// register takes the count read from Param_R, and on Wren Acc+1 is written
// back to Param_R and theta to Param_T, at the same address. All of this is
// the design's structure.
//
// Choices of this implementation: the RAM address is the low RHO_AW bits
// of the 16-bit two's-complement Rho (the design feeds rho to a 256-word
// RAM as its address), so rho values 256 apart share a word; while the
// engine is not busy the RAMs are addressed by rd_addr instead, so that the
// votes can be read out (acc_rd and t_out one clock after rd_addr).
// The whole control word enters for clarity; its counter steps (ld1, ld2)
// drive the counters outside and are not used here.
module hough_datapath
  import hough_pkg::*;
#(
  parameter int unsigned RHO_AW  = 8,
  parameter string       X_HEX   = "rtl/x_pixel.hex",
  parameter string       Y_HEX   = "rtl/y_pixel.hex"
) (
  input  logic                     clk,
  input  logic                     rst,
  input  ctrl_t                    ctrl,
  input  logic                     busy,
  input  logic        [THETA_W-1:0] theta,
  input  logic        [PIX_W-1:0]  xy,
  input  logic        [RHO_AW-1:0] rd_addr,
  output logic signed [TRIG_W-1:0] cos_out,
  output logic signed [TRIG_W-1:0] sin_out,
  output logic        [PIX_W-1:0]  x_out,
  output logic        [PIX_W-1:0]  y_out,
  output logic signed [RHO_W-1:0]  rho,
  output logic        [VOTE_W-1:0] acc,
  output logic        [VOTE_W-1:0] acc_rd,   // Param_R read data (Acc_in)
  output logic        [VOTE_W-1:0] t_out     // Param_T read data
);

  logic [TRIG_W-1:0] cos_in, sin_in;
  logic [PIX_W-1:0]  x_in, y_in;
  logic signed [RHO_W-1:0] rho_in;
  logic [RHO_AW-1:0] ram_addr;
  logic [VOTE_W-1:0] acc_add;

  trig_rom #(.IS_SIN(1'b0)) u_rom_cos (.clk, .addr(theta), .data(cos_in));
  trig_rom #(.IS_SIN(1'b1)) u_rom_sin (.clk, .addr(theta), .data(sin_in));
  sync_rom #(.DW(PIX_W), .AW(PIX_W), .INIT_FILE(X_HEX)) u_rom_x
    (.clk, .addr(xy), .data(x_in));
  sync_rom #(.DW(PIX_W), .AW(PIX_W), .INIT_FILE(Y_HEX)) u_rom_y
    (.clk, .addr(xy), .data(y_in));

  load_reg #(.W(TRIG_W)) u_reg_cos (.clk, .rst, .ld(ctrl.ldc), .d(cos_in), .q(cos_out));
  load_reg #(.W(TRIG_W)) u_reg_sin (.clk, .rst, .ld(ctrl.lds), .d(sin_in), .q(sin_out));
  load_reg #(.W(PIX_W))  u_reg_x   (.clk, .rst, .ld(ctrl.ldx), .d(x_in),   .q(x_out));
  load_reg #(.W(PIX_W))  u_reg_y   (.clk, .rst, .ld(ctrl.ldy), .d(y_in),   .q(y_out));

  rho_unit u_rho (.x(x_out), .y(y_out), .cos_v(cos_out), .sin_v(sin_out), .rho(rho_in));

  load_reg #(.W(RHO_W)) u_reg_rho (.clk, .rst, .ld(ctrl.ldr), .d(rho_in), .q(rho));

  assign ram_addr = busy ? rho[RHO_AW-1:0] : rd_addr;

  sp_ram #(.DW(VOTE_W), .AW(RHO_AW)) u_param_r
    (.clk, .we(ctrl.wren), .addr(ram_addr), .wdata(acc_add), .rdata(acc_rd));

  load_reg #(.W(VOTE_W)) u_reg_acc (.clk, .rst, .ld(ctrl.lda), .d(acc_rd), .q(acc));

  assign acc_add = acc + 1'b1;

  sp_ram #(.DW(VOTE_W), .AW(RHO_AW)) u_param_t
    (.clk, .we(ctrl.wren), .addr(ram_addr), .wdata(VOTE_W'(theta)), .rdata(t_out));

endmodule
