// lo_gen: three-level I/Q LO sequencer for digital down conversion.
//
// With the modulator clocked at four times the IF, the sampled LO signals
// cos[n*pi/2] and sin[n*pi/2] repeat every four samples with values in
// {-1, 0, +1} (thesis, Fig. 2.12). A 2-bit counter tracks n mod 4; the LO
// values are decoded from it. One sequencer is shared by every element.
// Timing: after reset the phase is 0 (cos = +1, sin = 0) and advances by one
// every clock. The synchronous active-low reset is this design's choice.
module lo_gen
  import bsp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  output lo_phase_t        phase,   // n mod 4
  output logic signed [1:0] lo_cos, // cos[n*pi/2]
  output logic signed [1:0] lo_sin  // sin[n*pi/2]
);

  always_ff @(posedge clk) begin
    if (!rst_n) phase <= LO_PH0;
    else        phase <= phase + 2'd1;
  end

  always_comb begin
    unique case (phase)
      LO_PH0:  begin lo_cos = 2'sd1;  lo_sin = 2'sd0;  end
      LO_PH1:  begin lo_cos = 2'sd0;  lo_sin = 2'sd1;  end
      LO_PH2:  begin lo_cos = -2'sd1; lo_sin = 2'sd0;  end
      LO_PH3:  begin lo_cos = 2'sd0;  lo_sin = -2'sd1; end
      default: begin lo_cos = 2'sd0;  lo_sin = 2'sd0;  end
    endcase
  end

endmodule
