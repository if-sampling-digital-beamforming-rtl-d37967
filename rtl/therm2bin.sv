// therm2bin: the summer behind the five-level flash quantizer.
//
// The quantizer's four comparators produce a thermometer code T[3:0]; the
// thesis says a summer turns it into a 3-bit binary value. Here the summer
// counts the ones (0..4) and subtracts 2, so the output is the signed
// five-level sample -2..+2 that the DDC stage consumes. Centring the count on
// zero is this design's choice; the thesis only names the summer.
// Purely combinational: the output follows T in the same clock cycle.
// An assertion flags a code with a bubble (a one above a zero), which a
// well-behaved flash quantizer never produces.
module therm2bin
  import bsp_pkg::*;
(
  input  logic [3:0] therm,  // T3..T0 from the comparators
  output lvl5_t      level   // signed five-level value, -2..+2
);

  logic [2:0] ones;

  always_comb begin
    ones = 3'd0;
    for (int b = 0; b < 4; b++) ones = ones + {2'b00, therm[b]};
    level = lvl5_t'($signed(ones) - 3'sd2);
  end

  // A thermometer code is all ones below all zeros: 0000, 0001, 0011, 0111, 1111.
  always_comb begin
    assert (therm == 4'b0000 || therm == 4'b0001 || therm == 4'b0011 ||
            therm == 4'b0111 || therm == 4'b1111 || $isunknown(therm))
      else $error("therm2bin: bubble in thermometer code %b", therm);
  end

endmodule
