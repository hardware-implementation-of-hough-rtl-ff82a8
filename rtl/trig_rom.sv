// trig_rom: 256x8 cosine or sine lookup table with a registered read.
//
// Word a holds round(127*cos(a degrees)) (IS_SIN = 0) or
// round(127*sin(a degrees)) (IS_SIN = 1) for a = 0..180, as an 8-bit two's
// complement number; words 181..255 hold 0 and are never addressed. Halves
// are rounded away from zero (a 1e-9 bias absorbs the floating-point error
// of exact halves such as cos 60 = 0.5), so cos 60 = 64, cos 120 = -64 and
// sin 60 = 110, the values of the design's published tables and worked
// example. The table is computed when the design is elaborated, so no data
// file is needed and synthesis sees a ROM with its contents.
//
// The read is registered, as in FPGA block memory: data shows the word at
// the address presented on the previous rising edge.
module trig_rom #(
  parameter bit IS_SIN = 1'b0
) (
  input  logic       clk,
  input  logic [7:0] addr,
  output logic [7:0] data
);

  typedef logic [7:0] table_t [256];

  localparam real PI = 3.14159265358979323846;

  function automatic table_t build_table();
    table_t t;
    real v, a;
    for (int d = 0; d < 256; d++) begin
      if (d > 180) begin
        t[d] = '0;
      end else begin
        v = 127.0 * (IS_SIN ? $sin(d * PI / 180.0) : $cos(d * PI / 180.0));
        a = (v < 0.0) ? -v : v;
        a = $floor(a + 0.5 + 1.0e-9);
        t[d] = (v < 0.0) ? 8'(-int'(a)) : 8'(int'(a));
      end
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) data <= TABLE[addr];

endmodule
