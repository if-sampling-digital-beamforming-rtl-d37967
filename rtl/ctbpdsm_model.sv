// ctbpdsm_model: behavioural model of one band-pass delta-sigma modulator.
// This is a behavioural model, not synthesizable logic: the real part is a
// 4th-order continuous-time band-pass modulator built from two single op-amp
// resonators, a transimpedance amplifier, a five-level flash quantizer and
// current-steering RZ/HZ feedback DACs.
//
// What is kept from the real part: sampling at fs = 4*fIF (one sample per
// clock), a 4th-order noise transfer function with its zeros at fs/4, a
// five-level quantizer with four comparators, and the thermometer code
// T3..T0 at the output. What is this model's own: the loop is written as a
// discrete-time error-feedback modulator with NTF(z) = (1 + z^-2)^2 and
// STF(z) = 1, instead of the impulse-invariant equivalent of the analog loop.
// Both have two NTF zero pairs at +-j (the thesis' loop places them at
// z^2 = -0.98). Comparator thresholds are -1.5, -0.5, +0.5, +1.5 in units of
// one output level, so the input is stable for |vin| up to about 1.0.
// Thermal noise: every modulator adds its own white input-referred noise of
// NOISE_RMS (approximately Gaussian, a sum of twelve uniform draws). The
// default, 0.0068 of a level, gives a 0.7-level tone an SNR of about 55 dB
// in a 10 MHz band at fs = 1.04 GHz, close to the 54 dB that the modulators
// of the 8-element chip reach on average; this calibration is this model's
// own.
// The noise of different instances is uncorrelated, as the channel noise of
// the real array is.
// Interface: vin is the IF input in units of one quantizer level, read at
// each rising clock edge; therm is updated at that edge.
module ctbpdsm_model #(
  parameter real NOISE_RMS = 0.0068  // input-referred noise, in quantizer levels
) (
  input  logic       clk,
  input  logic       rst_n,
  input  real        vin,    // IF input, normalised to one quantizer step
  output logic [3:0] therm   // thermometer code T3..T0
);

  real e1, e2, e3, e4;  // quantization errors of the last four samples

  function automatic logic [3:0] flash(real y);
    logic [3:0] t;
    t[0] = (y > -1.5);
    t[1] = (y > -0.5);
    t[2] = (y >  0.5);
    t[3] = (y >  1.5);
    return t;
  endfunction

  // Zero-mean, unit-variance noise sample (sum of twelve uniform draws).
  function automatic real gauss();
    real g = -6.0;
    for (int k = 0; k < 12; k++) g += real'($urandom) / 4294967296.0;
    return g;
  endfunction

  function automatic real level_of(logic [3:0] t);
    return real'(int'(t[0]) + int'(t[1]) + int'(t[2]) + int'(t[3])) - 2.0;
  endfunction

  always @(posedge clk) begin : loop
    real y;
    logic [3:0] t;
    if (!rst_n) begin
      e1 <= 0.0; e2 <= 0.0; e3 <= 0.0; e4 <= 0.0;
      therm <= 4'b0011;
    end else begin
      // v = u + e + 2 e[n-2] + e[n-4]
      y = vin + NOISE_RMS * gauss() + 2.0 * e2 + e4;
      t = flash(y);
      e1 <= level_of(t) - y;
      e2 <= e1;
      e3 <= e2;
      e4 <= e3;
      therm <= t;
    end
  end

endmodule
