// tb_array_snr_run: measures the array SNR improvement of one receiver size
// (used by tb_array_snr). NE IF tones with a 45-degree phase step between
// elements are received. Beam 0 is first steered at them with all NE
// elements, then given a weight on one element alone, for each element in
// turn; in each phase the beam summer output (full resolution, before the
// decimation filter) is recorded for NS = NOUT * M clocks, and the NOUT
// decimated outputs of the same span. The beam is recorded NE times as
// well, and each SNR is taken over all records of its phase, since a single
// record varies by a few dB.
// A Hann-windowed DFT over +-BAND bins around DC gives the tone power (the
// five bins around the tone) and the noise power (all other bins of the
// band), each summed over the records of a phase; the window keeps the strong shaped noise outside the band from
// leaking into the band bins. The tone adds coherently (20 log NE) while the
// modulators' noise adds as uncorrelated power (10 log NE), so the NE-element
// beam must gain 10 log NE +- 1.5 dB in SNR, both at the summer and at the
// decimated outputs, and keep at least 50 dB at the outputs.
// Interface: runs from time 0 on clk; raises done with its check counts.
module tb_array_snr_run #(
  parameter int NE = 8, NB = 2, WB = 6, M = 4,
  parameter int TONE_BIN = 16,  // tone frequency, in output DFT bins
  parameter int BAND = 39       // half band, in output DFT bins (5 MHz)
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam real PI = 3.14159265358979;
  localparam real THETA = PI / 4.0;
  localparam real AMP = 0.7;
  localparam int NOUT = 2048;
  localparam int NS = NOUT * M;  // recorded summation samples
  localparam real DF = real'(TONE_BIN) / real'(NS);  // cycles per input sample
  localparam int WMAX = 2 ** (WB - 1) - 1;
  localparam int BW = (NB > 1) ? $clog2(NB) : 1;
  localparam int EW = (NE > 1) ? $clog2(NE) : 1;

  logic rst_n = 0;
  real if_in [NE];
  logic wr_en = 0;
  logic [BW-1:0] wr_beam = '0;
  logic [EW-1:0] wr_elem = '0;
  logic signed [WB-1:0] wr_cos = '0, wr_sin = '0;
  logic signed [12:0] beam_i [NB];
  logic signed [12:0] beam_q [NB];
  logic beam_valid;

  int n = 0;
  // Index 0 .. NE-1: all elements; index NE + k: element k alone.
  real yi [2 * NE][NOUT], yq [2 * NE][NOUT];
  real si [2 * NE][NS], sq [2 * NE][NS];

  bsp_beamformer #(.N_ELEM(NE), .N_BEAM(NB), .W_BITS(WB), .DEC_M(M)) dut (
    .clk, .rst_n, .if_in, .wr_en, .wr_beam, .wr_elem, .wr_cos, .wr_sin,
    .beam_i, .beam_q, .beam_valid);

  function automatic int rnd(real v);
    return int'($rtoi($floor(v + 0.5)));
  endfunction

  task automatic step();
    for (int k = 0; k < NE; k++)
      if_in[k] = AMP * $cos(PI / 2.0 * n + 2.0 * PI * DF * n + 0.7 - k * THETA);
    @(negedge clk);
    n++;
  endtask

  task automatic write_w(int k, int c, int s);
    wr_en = 1; wr_beam = '0; wr_elem = EW'(k); wr_cos = WB'(c); wr_sin = WB'(s);
    step();
    wr_en = 0;
  endtask

  // Records beam 0 into set p after the filter has settled.
  task automatic record(int p);
    int cnt = 0;
    repeat (200) step();
    for (int m = 0; m < NS; m++) begin
      step();
      si[p][m] = real'(dut.u_core.sum_i[0]);
      sq[p][m] = real'(dut.u_core.sum_q[0]);
      if (beam_valid && cnt < NOUT) begin
        yi[p][cnt] = real'(beam_i[0]);
        yq[p][cnt] = real'(beam_q[0]);
        cnt++;
      end
    end
    checks++;
    if (cnt != NOUT) begin failures++; $display("FAIL %0d outputs recorded, expected %0d", cnt, NOUT); end
  endtask

  // Power of DFT bin kb (in output bins) of set p, from the decimated
  // outputs (summed = 0) or the summer output (summed = 1).
  function automatic real bin_pow(bit summed, int p, int kb);
    real re = 0.0, im = 0.0, a, w, xi, xq;
    int len = summed ? NS : NOUT;
    for (int m = 0; m < len; m++) begin
      a = -2.0 * PI * kb * m / len;
      w = 0.5 - 0.5 * $cos(2.0 * PI * m / len);
      xi = summed ? si[p][m] : yi[p][m];
      xq = summed ? sq[p][m] : yq[p][m];
      re += w * (xi * $cos(a) - xq * $sin(a));
      im += w * (xi * $sin(a) + xq * $cos(a));
    end
    return re * re + im * im;
  endfunction

  // In-band SNR of sets p0 .. p1 together.
  function automatic real band_snr(bit summed, int p0, int p1);
    real ps = 0.0, pn = 0.0, pw;
    for (int p = p0; p <= p1; p++)
      for (int kb = -BAND; kb <= BAND; kb++) begin
        pw = bin_pow(summed, p, kb);
        if (kb >= TONE_BIN - 2 && kb <= TONE_BIN + 2) ps += pw;
        else                                        pn += pw;
      end
    return 10.0 * $log10(ps / pn);
  endfunction

  initial begin
    real ideal, gs, go, snr_out, s_all, s_one, o_one;
    done = 0; checks = 0; failures = 0;
    for (int k = 0; k < NE; k++) if_in[k] = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NE; k++) write_w(k, rnd(WMAX * $cos(k * THETA)), rnd(WMAX * $sin(k * THETA)));
    for (int r = 0; r < NE; r++) record(r);
    for (int e = 0; e < NE; e++) begin
      for (int k = 0; k < NE; k++) write_w(k, (k == e) ? rnd(WMAX * $cos(k * THETA)) : 0,
                                              (k == e) ? rnd(WMAX * $sin(k * THETA)) : 0);
      record(NE + e);
    end
    ideal   = 10.0 * $log10(real'(NE));
    snr_out = band_snr(1'b0, 0, NE - 1);
    s_all   = band_snr(1'b1, 0, NE - 1);
    s_one   = band_snr(1'b1, NE, 2 * NE - 1);
    o_one   = band_snr(1'b0, NE, 2 * NE - 1);
    gs = s_all - s_one;
    go = snr_out - o_one;
    $display("%0d elements: SNR %0.1f dB (beam) / %0.1f dB (one element) at the summer, %0.1f / %0.1f dB at the outputs",
             NE, s_all, s_one, snr_out, o_one);
    $display("%0d elements: SNR improvement %0.1f dB at the summer, %0.1f dB at the outputs (ideal %0.1f dB); output SNR %0.1f dB",
             NE, gs, go, ideal, snr_out);
    checks++;
    if (gs < ideal - 1.5 || gs > ideal + 1.5) begin failures++; $display("FAIL SNR improvement at the summer"); end
    checks++;
    if (go < ideal - 1.5 || go > ideal + 1.5) begin failures++; $display("FAIL SNR improvement at the outputs"); end
    checks++;
    if (snr_out < 50.0) begin failures++; $display("FAIL output SNR"); end
    done = 1;
  end
endmodule
