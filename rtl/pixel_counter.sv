// pixel_counter: the XY register that indexes the edge-pixel ROMs.
//
// XY starts at 0 and steps by one each time ld (Ld2) is high. While XY
// holds LAST (5, the sixth pixel) the done flag is high, and the next step
// returns XY to 0. Register, hold mux, +1 adder and the "=5" compare
// driving done are the design's; the reset is this implementation's.
//
// Timing: xy changes on the clock edge ending a cycle with ld high; done
// is combinational from xy.
module pixel_counter #(
  parameter int unsigned W    = 8,
  parameter int unsigned LAST = 5
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  output logic [W-1:0] xy,
  output logic         done
);

  assign done = (xy == W'(LAST));

  always_ff @(posedge clk) begin
    if (rst)     xy <= '0;
    else if (ld) xy <= done ? '0 : xy + 1'b1;
  end

endmodule
