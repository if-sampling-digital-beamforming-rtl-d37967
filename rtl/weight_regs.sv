// weight_regs: programmable complex weights of every beam and element.
//
// Each phase shifter multiplies by a complex weight C + jS held in a
// register (thesis: "a multi-bit coefficient, W, which is stored in a
// register"; "programmable complex weights"). The thesis does not describe
// how the weights are loaded, so this design uses a simple parallel write
// port: when wr_en is high, the pair (wr_cos, wr_sin) is stored for element
// wr_elem of beam wr_beam at the next clock edge. A write of the most
// negative code -2^(W_BITS-1) is stored as -(2^(W_BITS-1)-1), keeping every
// factor in the symmetric range the 5:1 MUX multiplier can double without
// overflow (the thesis counts (2^b - 1)^2 weight vectors, i.e. that range).
// Reset loads C = 2^(W_BITS-1)-1, S = 0 (zero phase shift) everywhere.
module weight_regs #(
  parameter int unsigned N_BEAM = 2,  // simultaneous beams
  parameter int unsigned N_ELEM = 8,  // antenna elements
  parameter int unsigned W_BITS = 6,  // weighting factor width
  localparam int unsigned BEAM_W = (N_BEAM > 1) ? $clog2(N_BEAM) : 1,
  localparam int unsigned ELEM_W = (N_ELEM > 1) ? $clog2(N_ELEM) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [BEAM_W-1:0]        wr_beam,
  input  logic [ELEM_W-1:0]        wr_elem,
  input  logic signed [W_BITS-1:0] wr_cos,
  input  logic signed [W_BITS-1:0] wr_sin,
  output logic signed [W_BITS-1:0] w_cos [N_BEAM][N_ELEM],
  output logic signed [W_BITS-1:0] w_sin [N_BEAM][N_ELEM]
);

  localparam logic signed [W_BITS-1:0] W_MAX = {1'b0, {(W_BITS-1){1'b1}}};
  localparam logic signed [W_BITS-1:0] W_MIN = {1'b1, {(W_BITS-1){1'b0}}};

  function automatic logic signed [W_BITS-1:0] clip(logic signed [W_BITS-1:0] v);
    return (v == W_MIN) ? -W_MAX : v;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < int'(N_BEAM); b++)
        for (int e = 0; e < int'(N_ELEM); e++) begin
          w_cos[b][e] <= W_MAX;
          w_sin[b][e] <= '0;
        end
    end else if (wr_en) begin
      for (int b = 0; b < int'(N_BEAM); b++)
        for (int e = 0; e < int'(N_ELEM); e++)
          if (BEAM_W'(b) == wr_beam && ELEM_W'(e) == wr_elem) begin
            w_cos[b][e] <= clip(wr_cos);
            w_sin[b][e] <= clip(wr_sin);
          end
    end
  end

endmodule
