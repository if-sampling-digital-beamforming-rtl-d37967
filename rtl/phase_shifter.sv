// phase_shifter: complex weight multiplication with MUXs only.
//
// Rotates one element's down-converted stream by the complex weight
// e^{j*theta} = C + jS, i.e. I' = C*i - S*q and Q' = S*i + C*q (thesis eqs.
// 2.10 and 2.11). Four 5:1 MUX multipliers form C*i, S*i, C*q and S*(-q);
// the sign of the last is taken by relabelling the five-level q, not by an
// adder. Because the three-level LO sequences are alternately zero, only one
// of i and q is non-zero at any sample, so each sum reduces to a 2:1 MUX
// steered by q_phase (thesis Fig. 2.11(b)).
// Timing: one register stage on the outputs, synchronous active-low reset.
module phase_shifter
  import bsp_pkg::*;
#(
  parameter int unsigned W_BITS = 6  // weighting factor width (6 in prototype II)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  lvl5_t                    i_in,
  input  lvl5_t                    q_in,
  input  logic                     q_phase,  // 1: i_in is zero this sample
  input  logic signed [W_BITS-1:0] w_cos,    // C = round(A*cos(theta))
  input  logic signed [W_BITS-1:0] w_sin,    // S = round(A*sin(theta))
  output logic signed [W_BITS:0]   i_out,    // I'
  output logic signed [W_BITS:0]   q_out     // Q'
);

  logic signed [W_BITS:0] ci, si, cq, snq;

  mux5_mult #(.W_BITS(W_BITS)) u_ci  (.w(w_cos), .x(i_in),           .wx(ci));
  mux5_mult #(.W_BITS(W_BITS)) u_si  (.w(w_sin), .x(i_in),           .wx(si));
  mux5_mult #(.W_BITS(W_BITS)) u_cq  (.w(w_cos), .x(q_in),           .wx(cq));
  mux5_mult #(.W_BITS(W_BITS)) u_snq (.w(w_sin), .x(lvl5_neg(q_in)), .wx(snq));

  // The 2:1 MUXs stand in for the adders; they are exact only while one of
  // the two streams is zero.
  always_comb begin
    if (q_phase) assert (i_in == '0) else $error("phase_shifter: i non-zero on a q sample");
    else         assert (q_in == '0) else $error("phase_shifter: q non-zero on an i sample");
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_out <= '0;
      q_out <= '0;
    end else begin
      i_out <= q_phase ? snq : ci;
      q_out <= q_phase ? cq  : si;
    end
  end

endmodule
