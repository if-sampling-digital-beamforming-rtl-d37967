// mux5_mult: five-level stream multiplication with a 5:1 MUX.
//
// Multiplies a stored weighting factor W by a five-level sample X without a
// multiplier: the output is chosen among -W<<1, -W, 0, +W and +W<<1
// (thesis Figs. 2.6 and 2.13(b)). The result is one bit wider than W, which
// holds 2*W as long as W stays in the symmetric range
// -(2^(W_BITS-1)-1) .. +(2^(W_BITS-1)-1); the weight registers keep it there.
// Example from the thesis: X = 2, W = 27 gives WX = 54 in 7 bits.
// Purely combinational.
module mux5_mult
  import bsp_pkg::*;
#(
  parameter int unsigned W_BITS = 6  // weighting factor width (6 in prototype II)
) (
  input  logic signed [W_BITS-1:0] w,   // stored weighting factor
  input  lvl5_t                    x,   // five-level sample
  output logic signed [W_BITS:0]   wx   // W * X
);

  logic signed [W_BITS:0] w_ext, w_neg, w_sh, w_nsh;

  always_comb begin
    w_ext = {w[W_BITS-1], w};
    w_neg = -w_ext;
    w_sh  = w_ext <<< 1;
    w_nsh = w_neg <<< 1;
    unique case (x)
      -3'sd2:  wx = w_nsh;
      -3'sd1:  wx = w_neg;
      3'sd1:   wx = w_ext;
      3'sd2:   wx = w_sh;
      default: wx = '0;
    endcase
  end

endmodule
