// hough_pkg: widths, FSM states and the control word shared by the Hough
// transform engine.
//
// The 8-bit angle, pixel and trigonometric widths and the 16-bit rho and
// vote widths are the ones printed on the block and detail diagrams of the
// design. The control word bundles the nine trigger signals of the control
// sequence table (LdC, LdS, LdX, LdY, LdR, LdA, Wren, Ld1, Ld2) in that
// order. The state names S0..S7 follow the table; the encoding is binary
// (three bits, as the simulated "state" bus of the design shows).
package hough_pkg;

  localparam int unsigned THETA_W = 8;   // angle in degrees, 0..180
  localparam int unsigned PIX_W   = 8;   // pixel coordinate and pixel index
  localparam int unsigned TRIG_W  = 8;   // signed cos/sin, scaled by 127
  localparam int unsigned RHO_W   = 16;  // rho = x*cos + y*sin
  localparam int unsigned VOTE_W  = 16;  // Param_R / Param_T word width

  typedef enum logic [2:0] {
    S0_IDLE  = 3'd0,  // wait for start
    S1_ADDR  = 3'd1,  // counters address the ROMs
    S2_LOAD  = 3'd2,  // COS, SIN, X, Y registers load
    S3_RHO   = 3'd3,  // Rho register loads x*cos + y*sin
    S4_READ  = 3'd4,  // Param_R read at Rho
    S5_ACC   = 3'd5,  // Acc register loads the old vote count
    S6_WRITE = 3'd6,  // Acc+1 and theta written back, counters step
    S7_DONE  = 3'd7   // all pixels swept, done pulse
  } state_t;

  typedef struct packed {
    logic ldc;   // COS register load
    logic lds;   // SIN register load
    logic ldx;   // X register load
    logic ldy;   // Y register load
    logic ldr;   // Rho register load
    logic lda;   // Acc register load
    logic wren;  // Param_R / Param_T write enable
    logic ld1;   // theta counter step
    logic ld2;   // pixel counter step
  } ctrl_t;

endpackage
