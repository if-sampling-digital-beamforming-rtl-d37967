// dbf_core: bit-stream-processing digital beamforming core.
//
// Forms N_BEAM independent beams from N_ELEM five-level band-pass
// delta-sigma streams sampled at fs = 4*fIF, without multipliers and with a
// single decimator per beam output (thesis Sec. 2.4, Fig. 2.16(b)):
//   1. the thermometer code of each modulator is summed to a five-level
//      sample and registered;
//   2. one shared LO sequencer drives a MUX-based DDC per element, giving
//      five-level baseband I/Q streams;
//   3. for every beam, each element's I/Q streams are rotated by that beam's
//      programmable complex weight in a MUX-only phase shifter;
//   4. per beam, the rotated I' and Q' streams of all elements are summed
//      (10-bit words at fs);
//   5. per beam, I and Q are decimated by DEC_M in an order-CIC_L cascaded
//      sinc filter to OUT_BITS-bit words at fs/DEC_M.
// Defaults are the thesis' prototype II (8 elements, 2 beams, 6-bit
// weighting factors, decimation by 4); prototype I is N_ELEM=4, N_BEAM=1,
// W_BITS=7, DEC_M=8. The register stage per step, the weight write port
// and the synchronous active-low reset are this design's choices.
// Timing: an input sample reaches the decimator input four clocks after it
// is applied (input register, DDC, phase shifter, summer); beam_valid pulses
// once every DEC_M clocks with all beams' outputs.
module dbf_core
  import bsp_pkg::*;
#(
  parameter int unsigned N_ELEM   = 8,   // antenna elements / modulators
  parameter int unsigned N_BEAM   = 2,   // simultaneous beams
  parameter int unsigned W_BITS   = 6,   // weighting factor width
  parameter int unsigned DEC_M    = 4,   // decimation ratio
  parameter int unsigned CIC_L    = 5,   // decimation filter order
  parameter int unsigned OUT_BITS = 13,  // decimated output width
  localparam int unsigned PS_W   = W_BITS + 1,              // phase shifter output
  localparam int unsigned SUM_W  = PS_W + $clog2(N_ELEM),   // beam word at fs
  localparam int unsigned BEAM_W = (N_BEAM > 1) ? $clog2(N_BEAM) : 1,
  localparam int unsigned ELEM_W = (N_ELEM > 1) ? $clog2(N_ELEM) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [3:0]                 therm [N_ELEM],  // modulator thermometer codes
  // complex weight write port
  input  logic                       wr_en,
  input  logic [BEAM_W-1:0]          wr_beam,
  input  logic [ELEM_W-1:0]          wr_elem,
  input  logic signed [W_BITS-1:0]   wr_cos,
  input  logic signed [W_BITS-1:0]   wr_sin,
  // beam outputs at fs/DEC_M
  output logic signed [OUT_BITS-1:0] beam_i [N_BEAM],
  output logic signed [OUT_BITS-1:0] beam_q [N_BEAM],
  output logic                       beam_valid
);

  lo_phase_t         lo_phase_unused;
  logic signed [1:0] lo_cos, lo_sin;     // LO values of the current clock
  logic signed [1:0] x_cos, x_sin;       // LO values of the registered sample

  lvl5_t x_lvl [N_ELEM];
  lvl5_t x_reg [N_ELEM];
  lvl5_t ddc_i [N_ELEM];
  lvl5_t ddc_q [N_ELEM];
  logic  ddc_qph [N_ELEM];

  logic signed [W_BITS-1:0] w_cos [N_BEAM][N_ELEM];
  logic signed [W_BITS-1:0] w_sin [N_BEAM][N_ELEM];

  logic signed [PS_W-1:0]  ps_i [N_BEAM][N_ELEM];
  logic signed [PS_W-1:0]  ps_q [N_BEAM][N_ELEM];
  logic signed [SUM_W-1:0] sum_i [N_BEAM];
  logic signed [SUM_W-1:0] sum_q [N_BEAM];
  logic                    valid_i [N_BEAM];
  logic                    valid_q [N_BEAM];

  lo_gen u_lo (
    .clk, .rst_n, .phase(lo_phase_unused), .lo_cos, .lo_sin
  );

  weight_regs #(.N_BEAM(N_BEAM), .N_ELEM(N_ELEM), .W_BITS(W_BITS)) u_wregs (
    .clk, .rst_n, .wr_en, .wr_beam, .wr_elem, .wr_cos, .wr_sin, .w_cos, .w_sin
  );

  // Input register: modulator samples and the LO values of the same sample.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_cos <= 2'sd1;
      x_sin <= 2'sd0;
      for (int e = 0; e < int'(N_ELEM); e++) x_reg[e] <= '0;
    end else begin
      x_cos <= lo_cos;
      x_sin <= lo_sin;
      for (int e = 0; e < int'(N_ELEM); e++) x_reg[e] <= x_lvl[e];
    end
  end

  for (genvar e = 0; e < N_ELEM; e++) begin : g_elem
    therm2bin u_t2b (.therm(therm[e]), .level(x_lvl[e]));

    ddc_mux u_ddc (
      .clk, .rst_n, .x(x_reg[e]), .lo_cos(x_cos), .lo_sin(x_sin),
      .i_out(ddc_i[e]), .q_out(ddc_q[e]), .q_phase(ddc_qph[e])
    );
  end

  for (genvar b = 0; b < N_BEAM; b++) begin : g_beam
    for (genvar e = 0; e < N_ELEM; e++) begin : g_ps
      phase_shifter #(.W_BITS(W_BITS)) u_ps (
        .clk, .rst_n,
        .i_in(ddc_i[e]), .q_in(ddc_q[e]), .q_phase(ddc_qph[e]),
        .w_cos(w_cos[b][e]), .w_sin(w_sin[b][e]),
        .i_out(ps_i[b][e]), .q_out(ps_q[b][e])
      );
    end

    beam_summer #(.N_IN(N_ELEM), .IN_W(PS_W), .OUT_W(SUM_W)) u_sum_i (
      .clk, .rst_n, .din(ps_i[b]), .sum(sum_i[b])
    );
    beam_summer #(.N_IN(N_ELEM), .IN_W(PS_W), .OUT_W(SUM_W)) u_sum_q (
      .clk, .rst_n, .din(ps_q[b]), .sum(sum_q[b])
    );

    cic_decimator #(.IN_W(SUM_W), .OUT_W(OUT_BITS), .L(CIC_L), .M(DEC_M)) u_cic_i (
      .clk, .rst_n, .din(sum_i[b]), .dout(beam_i[b]), .out_valid(valid_i[b])
    );
    cic_decimator #(.IN_W(SUM_W), .OUT_W(OUT_BITS), .L(CIC_L), .M(DEC_M)) u_cic_q (
      .clk, .rst_n, .din(sum_q[b]), .dout(beam_q[b]), .out_valid(valid_q[b])
    );
  end

  // All decimators share clock and reset, so their strobes coincide.
  always_comb begin
    beam_valid = 1'b1;
    for (int b = 0; b < int'(N_BEAM); b++) beam_valid = beam_valid & valid_i[b] & valid_q[b];
  end

endmodule
