// control_unit: the state machine that sequences one Hough vote.
//
// Each vote (one edge pixel at one angle) takes six clocks, S1..S6:
//   S1  theta and XY, held in their counters, address the four ROMs
//   S2  LdC, LdS, LdX, LdY: the COS, SIN, X and Y registers load the ROMs
//   S3  LdR: the Rho register loads X*COS + Y*SIN
//   S4  Param_R and Param_T are read at Rho
//   S5  LdA: the Acc register loads the old vote count
//   S6  Wren: Acc+1 goes back into Param_R and theta into Param_T at Rho;
//       Ld1 steps theta, and Ld2 steps XY when theta is at its last angle
// S0 waits for start; after the S6 of the last pixel at the last angle the
// machine passes through S7, where done is high for one clock, and returns
// to S0. A full sweep of 6 pixels x 36 angles is 216 x 6 = 1296 busy
// clocks.
//
// The states and the LdC/LdS/LdX/LdY/LdR/LdA/Wren columns follow the
// design's control sequence table. That table also lists Ld1 and Ld2 (and
// "Theta <- Theta+5; XY <- XY+1") in every state S1..S6; here each counter
// steps once per vote, in S6, so that every angle of every pixel gets a
// vote, as the design's simulation trace shows (theta stepping by 5 with a
// new rho per step). S7 and the start/done handshake are this
// implementation's completion of the eight states.
module control_unit
  import hough_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,       // begin a sweep (sampled in S0)
  input  logic   theta_wrap,  // theta is at its last angle
  input  logic   xy_done,     // XY is at the last pixel
  output state_t state,
  output ctrl_t  ctrl,
  output logic   busy,        // S1..S6
  output logic   done         // one-clock pulse in S7
);

  state_t next;

  always_comb begin
    unique case (state)
      S0_IDLE:  next = start ? S1_ADDR : S0_IDLE;
      S1_ADDR:  next = S2_LOAD;
      S2_LOAD:  next = S3_RHO;
      S3_RHO:   next = S4_READ;
      S4_READ:  next = S5_ACC;
      S5_ACC:   next = S6_WRITE;
      S6_WRITE: next = (theta_wrap && xy_done) ? S7_DONE : S1_ADDR;
      S7_DONE:  next = S0_IDLE;
      default:  next = S0_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S0_IDLE;
    else     state <= next;
  end

  always_comb begin
    ctrl      = '0;
    ctrl.ldc  = (state == S2_LOAD);
    ctrl.lds  = (state == S2_LOAD);
    ctrl.ldx  = (state == S2_LOAD);
    ctrl.ldy  = (state == S2_LOAD);
    ctrl.ldr  = (state == S3_RHO);
    ctrl.lda  = (state == S5_ACC);
    ctrl.wren = (state == S6_WRITE);
    ctrl.ld1  = (state == S6_WRITE);
    ctrl.ld2  = (state == S6_WRITE) && theta_wrap;
  end

  assign busy = (state != S0_IDLE) && (state != S7_DONE);
  assign done = (state == S7_DONE);

  // The RAM write and the counter steps belong to the same clock.
  a_write_steps: assert property (@(posedge clk) disable iff (rst)
                                  ctrl.wren |-> ctrl.ld1);
  // A sweep always ends through S6 of the last vote.
  a_done_after_write: assert property (@(posedge clk) disable iff (rst)
                                       done |-> $past(state) == S6_WRITE);

endmodule
