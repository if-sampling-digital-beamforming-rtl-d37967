// cic_decimator: cascaded-sinc decimation filter of one beam output.
//
// Realises (1/M^L) * ((1 - z^-M) / (1 - z^-1))^L, the cascade of L sinc
// (moving-average) filters, in the efficient form of the thesis (Fig. 2.15):
// L integrators run at the input rate fs, the integrator output is down-
// sampled by M, and L differentiators with a one-sample delay run at fs/M.
// Two's-complement wrap-around in the integrators is harmless because the
// differentiators undo it; the accumulators are IN_W + L*log2(M) bits wide so
// the final result is exact. The output is that result rounded (half up)
// to its OUT_W most significant bits, i.e. the input scale with
// OUT_W - IN_W extra fractional bits. Rounding instead of truncation keeps
// a half-LSB DC offset out of the baseband; it cannot overflow, because the
// rounding constant is smaller than the filter's gain M^L. This scaling is
// this design's; the thesis only gives the 10-bit input and 13-bit output
// widths.
// Timing: a new input every clock; out_valid pulses once every M clocks with
// the output held in between. The differentiators are combinational between
// the down-sampling register and the output register, so they have M clocks
// to settle. Synchronous active-low reset clears all state.
module cic_decimator #(
  parameter int unsigned IN_W  = 10,  // input word width
  parameter int unsigned OUT_W = 13,  // output word width
  parameter int unsigned L     = 5,   // filter order (number of sinc stages)
  parameter int unsigned M     = 4,   // decimation ratio, a power of two
  localparam int unsigned ACC_W = IN_W + L * $clog2(M),
  localparam int unsigned SHIFT = ACC_W - OUT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    out_valid
);

  logic signed [ACC_W-1:0] integ [L];     // integrators at fs
  logic signed [ACC_W-1:0] dly   [L];     // differentiator delays at fs/M
  logic signed [ACC_W-1:0] diff  [L+1];   // differentiator chain
  logic [$clog2(M)-1:0]    phase;         // down-sampling counter
  logic                    dec_en;
  logic signed [ACC_W-1:0] rounded;

  assign rounded = diff[L] + (ACC_W'(1) <<< (SHIFT - 1));

  assign dec_en = (phase == ($clog2(M))'(M - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      for (int s = 0; s < int'(L); s++) integ[s] <= '0;
    end else begin
      phase    <= phase + 1'b1;
      integ[0] <= integ[0] + ACC_W'(din);
      for (int s = 1; s < int'(L); s++) integ[s] <= integ[s] + integ[s-1];
    end
  end

  // Differentiators: y_s = y_{s-1} - y_{s-1}(previous output sample).
  always_comb begin
    diff[0] = integ[L-1];
    for (int s = 0; s < int'(L); s++) diff[s+1] = diff[s] - dly[s];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(L); s++) dly[s] <= '0;
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= dec_en;
      if (dec_en) begin
        for (int s = 0; s < int'(L); s++) dly[s] <= diff[s];
        dout <= rounded[ACC_W-1 -: OUT_W];
      end
    end
  end

endmodule
