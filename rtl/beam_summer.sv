// beam_summer: adds the phase-shifted element signals of one beam output.
//
// A conventional multi-bit adder (thesis Sec. 2.4.2) sums N_IN signed words
// of IN_W bits into one word of IN_W + clog2(N_IN) bits, wide enough that
// the sum never overflows: 8 x 7 bit and 4 x 8 bit both give the 10-bit
// beam sample of the thesis. The adder runs at the full sample rate.
// Timing: one register stage, synchronous active-low reset.
module beam_summer #(
  parameter int unsigned N_IN  = 8,                       // elements summed
  parameter int unsigned IN_W  = 7,                       // element word width
  parameter int unsigned OUT_W = IN_W + $clog2(N_IN)      // beam word width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din [N_IN],
  output logic signed [OUT_W-1:0] sum
);

  logic signed [OUT_W-1:0] acc;

  always_comb begin
    acc = '0;
    for (int k = 0; k < int'(N_IN); k++) acc = acc + OUT_W'(din[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) sum <= '0;
    else        sum <= acc;
  end

endmodule
