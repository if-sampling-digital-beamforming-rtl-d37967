// tb_dbf_core_run: one self-checking run of dbf_core at a given size, used
// by tb_dbf_core. It feeds random legal thermometer codes to every element,
// loads random complex weights (and reloads part of them halfway), and
// compares every decimated beam output with a reference built here from
// integers only: five-level sample x -> i = cos[n*pi/2]*x, q = -sin[n*pi/2]*x
// -> I' = C*i - S*q, Q' = S*i + C*q summed over elements -> direct-form
// cascaded-sinc FIR -> every M-th result, low bits rounded off (half up). Latency assumed
// by the reference: a sample applied before clock t enters the decimator at
// clock t + 4, and the output of clock t is the filter result of decimator
// input t - L.
module tb_dbf_core_run #(
  parameter int NE = 8, NB = 2, WB = 6, M = 4, L = 5, OB = 13, NS = 2000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int BW = (NB > 1) ? $clog2(NB) : 1;
  localparam int EW = (NE > 1) ? $clog2(NE) : 1;
  localparam int SUM_W = WB + 1 + $clog2(NE);
  localparam int SHIFT = SUM_W + L * $clog2(M) - OB;

  logic rst_n = 0;
  logic [3:0] therm [NE];
  logic wr_en = 0;
  logic [BW-1:0] wr_beam = '0;
  logic [EW-1:0] wr_elem = '0;
  logic signed [WB-1:0] wr_cos = '0, wr_sin = '0;
  logic signed [OB-1:0] beam_i [NB];
  logic signed [OB-1:0] beam_q [NB];
  logic beam_valid;

  int xs [NS][NE];
  int wc [NB][NE], ws [NB][NE];
  longint si [NB][NS + 8], sq [NB][NS + 8];
  longint h [];
  int nvalid = 0, lastv = -1;

  dbf_core #(.N_ELEM(NE), .N_BEAM(NB), .W_BITS(WB), .DEC_M(M), .CIC_L(L), .OUT_BITS(OB)) dut (
    .clk, .rst_n, .therm, .wr_en, .wr_beam, .wr_elem, .wr_cos, .wr_sin, .beam_i, .beam_q, .beam_valid);

  function automatic void make_h();
    longint t [];
    h = new[1]; h[0] = 1;
    for (int s = 0; s < L; s++) begin
      t = new[h.size() + M - 1];
      foreach (t[k]) t[k] = 0;
      foreach (h[k]) for (int j = 0; j < M; j++) t[k + j] += h[k];
      h = t;
    end
  endfunction

  function automatic longint fir(ref longint s [NB][NS + 8], input int b, input int t);
    longint acc = 0;
    for (int j = 0; j < h.size(); j++) if (t - j >= 0) acc += h[j] * s[b][t - j];
    return (acc + (longint'(1) <<< (SHIFT - 1))) >>> SHIFT;
  endfunction

  // Reference beam sums of sample t, stored at decimator input index t + 4.
  task automatic ref_sample(int t);
    int lc [4] = '{1, 0, -1, 0};
    int ls [4] = '{0, 1, 0, -1};
    for (int b = 0; b < NB; b++) begin
      longint ai = 0, aq = 0;
      for (int e = 0; e < NE; e++) begin
        int iv, qv;
        iv = lc[t % 4] * xs[t][e];
        qv = -ls[t % 4] * xs[t][e];
        ai += wc[b][e] * iv - ws[b][e] * qv;
        aq += ws[b][e] * iv + wc[b][e] * qv;
      end
      si[b][t + 4] = ai;
      sq[b][t + 4] = aq;
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    make_h();
    foreach (therm[e]) therm[e] = 4'b0011;
    for (int b = 0; b < NB; b++) for (int e = 0; e < NE; e++) begin wc[b][e] = 2 ** (WB - 1) - 1; ws[b][e] = 0; end
    for (int b = 0; b < NB; b++) for (int t = 0; t < NS + 8; t++) begin si[b][t] = 0; sq[b][t] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NS; t++) begin
      for (int e = 0; e < NE; e++) begin
        int k;
        k = int'($urandom_range(4));
        xs[t][e] = k - 2;
        therm[e] = 4'((1 << k) - 1);
      end
      // weight writes at chosen clocks; they act from the next sample on
      if (t >= 4 && t < 4 + NB * NE) begin
        wr_en = 1; wr_beam = BW'((t - 4) / NE); wr_elem = EW'((t - 4) % NE);
        wr_cos = WB'(int'($urandom_range(2 ** WB - 2)) - (2 ** (WB - 1) - 1));
        wr_sin = WB'(int'($urandom_range(2 ** WB - 2)) - (2 ** (WB - 1) - 1));
      end else if (t == NS / 2) begin
        wr_en = 1; wr_beam = BW'(NB - 1); wr_elem = EW'(NE - 1);
        wr_cos = WB'(-(2 ** (WB - 1) - 1)); wr_sin = WB'(3);
      end else wr_en = 0;
      @(negedge clk);                  // clock t has happened
      if (wr_en) begin
        wc[wr_beam][wr_elem] = int'(wr_cos);
        ws[wr_beam][wr_elem] = int'(wr_sin);
      end
      if (t >= 1) ref_sample(t - 1);
      if (beam_valid) begin
        nvalid++;
        checks++;
        if (lastv >= 0 && t - lastv != M) begin failures++; $display("FAIL valid spacing %0d", t - lastv); end
        lastv = t;
        if (t - L >= 0 && t - L <= NS - 2 + 4) begin
          for (int b = 0; b < NB; b++) begin
            longint ei, eq;
            ei = fir(si, b, t - L);
            eq = fir(sq, b, t - L);
            checks++;
            if (longint'(beam_i[b]) != ei || longint'(beam_q[b]) != eq) begin
              failures++;
              if (failures < 10) $display("FAIL NE=%0d beam %0d t=%0d: %0d %0d expected %0d %0d", NE, b, t, beam_i[b], beam_q[b], ei, eq);
            end
          end
        end
      end
    end
    checks++;
    if (nvalid != NS / M) begin failures++; $display("FAIL %0d outputs, expected %0d", nvalid, NS / M); end
    done = 1;
  end
endmodule
