// bsp_beamformer: IF-sampling digital beamforming receiver, chip level.
//
// Each of N_ELEM IF inputs is digitised directly by a band-pass delta-sigma
// modulator clocked at four times the IF; the five-level modulator streams
// go, undecimated, into the bit-stream beamforming core. There a MUX-based
// down converter and MUX-based phase shifters replace every multiplier, the
// rotated element signals are summed per beam, and one cascaded-sinc
// decimator per beam output lowers the rate (thesis Ch. 2, Figs. 2.3(b),
// 2.10). The modulators are behavioural models (see ctbpdsm_model); the
// core is synthesizable.
// Defaults are prototype II: 8 elements, 2 beams, 6-bit weighting factors,
// decimation by 4 with a 5th-order filter, 13-bit outputs (1.04 GS/s in,
// 260 MS/s out). Prototype I is N_ELEM=4, N_BEAM=1, W_BITS=7, DEC_M=8.
// Interface: if_in is sampled on every rising clk edge; complex weights are
// written through the wr_* port; beam outputs are valid when beam_valid
// pulses, once every DEC_M clocks.
module bsp_beamformer #(
  parameter int unsigned N_ELEM   = 8,
  parameter int unsigned N_BEAM   = 2,
  parameter int unsigned W_BITS   = 6,
  parameter int unsigned DEC_M    = 4,
  parameter int unsigned CIC_L    = 5,
  parameter int unsigned OUT_BITS = 13,
  localparam int unsigned BEAM_W = (N_BEAM > 1) ? $clog2(N_BEAM) : 1,
  localparam int unsigned ELEM_W = (N_ELEM > 1) ? $clog2(N_ELEM) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  real                        if_in [N_ELEM],
  input  logic                       wr_en,
  input  logic [BEAM_W-1:0]          wr_beam,
  input  logic [ELEM_W-1:0]          wr_elem,
  input  logic signed [W_BITS-1:0]   wr_cos,
  input  logic signed [W_BITS-1:0]   wr_sin,
  output logic signed [OUT_BITS-1:0] beam_i [N_BEAM],
  output logic signed [OUT_BITS-1:0] beam_q [N_BEAM],
  output logic                       beam_valid
);

  logic [3:0] therm [N_ELEM];

  for (genvar e = 0; e < N_ELEM; e++) begin : g_adc
    ctbpdsm_model u_mod (.clk, .rst_n, .vin(if_in[e]), .therm(therm[e]));
  end

  dbf_core #(
    .N_ELEM(N_ELEM), .N_BEAM(N_BEAM), .W_BITS(W_BITS),
    .DEC_M(DEC_M), .CIC_L(CIC_L), .OUT_BITS(OUT_BITS)
  ) u_core (
    .clk, .rst_n, .therm,
    .wr_en, .wr_beam, .wr_elem, .wr_cos, .wr_sin,
    .beam_i, .beam_q, .beam_valid
  );

endmodule
