// ddc_mux: MUX-based digital down conversion of one five-level stream.
//
// Two 3:1 MUXs multiply the modulator output x[n] by the three-level LO
// sequences: i[n] = cos[n*pi/2] * x[n] and q[n] = -sin[n*pi/2] * x[n]
// (thesis eqs. 2.6 and 2.7). The LO value (+1, 0 or -1) is the MUX select:
// each MUX passes x, outputs 0 or passes -x, so both outputs stay five-level.
// At every sample one of i and q is zero; the flag q_phase marks the samples
// where cos is zero (n odd), i is zero and q carries the data. The phase
// shifter uses it to steer its 2:1 MUXs.
// Timing: one register stage; outputs appear one clock after x and the LO
// values of the same sample are applied. Synchronous active-low reset.
module ddc_mux
  import bsp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  lvl5_t             x,        // five-level modulator sample
  input  logic signed [1:0] lo_cos,   // cos[n*pi/2] of this sample
  input  logic signed [1:0] lo_sin,   // sin[n*pi/2] of this sample
  output lvl5_t             i_out,    // in-phase baseband stream
  output lvl5_t             q_out,    // quadrature baseband stream
  output logic              q_phase   // 1 when i_out is zero by construction
);

  lvl5_t i_d, q_d;

  // 3:1 MUX for I, selected by cos: +1 -> x, 0 -> 0, -1 -> -x.
  always_comb begin
    unique case (lo_cos)
      2'sd1:   i_d = x;
      -2'sd1:  i_d = lvl5_neg(x);
      default: i_d = '0;
    endcase
  end

  // 3:1 MUX for Q, selected by sin, multiplying by -sin: +1 -> -x, -1 -> x.
  always_comb begin
    unique case (lo_sin)
      2'sd1:   q_d = lvl5_neg(x);
      -2'sd1:  q_d = x;
      default: q_d = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_out   <= '0;
      q_out   <= '0;
      q_phase <= 1'b0;
    end else begin
      i_out   <= i_d;
      q_out   <= q_d;
      q_phase <= (lo_cos == 2'sd0);
    end
  end

endmodule
