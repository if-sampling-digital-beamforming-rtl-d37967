// tb_bsp_beamformer: end-to-end test of the beamforming receiver at its
// default size (8 elements, 2 beams, 6-bit weights, decimation by 4).
//
// A plane wave is mimicked by eight IF tones at fs/4 + fs/512 whose phase
// falls by THETA = 45 degrees from one element to the next. The testbench
// loads complex weights through the write port and measures the mean beam
// magnitude sqrt(I^2 + Q^2) over windows of decimated outputs:
//   A  beam 0 steered at the wave (weights e^{jk*THETA}): constructive, the
//      magnitude must match G*(A/2)*|sum_k W_k e^{-jk*THETA}| within 5 %;
//      beam 1 steered 90 degrees of phase step away: a null, below 10 % of
//      it (what remains is modulator noise the decimator lets through);
//   B  re-steering on the fly: the two beams' roles are swapped;
//   C  beam 0 gets the two-lobe weights (e^{jk*T1} + e^{jk*T2})/2 with one
//      lobe on the wave: the magnitude must match the same formula, about
//      half the single-lobe one; beam 1 keeps only element 0: the array gain
//      of beam 1 in phase B over this single element must be near 8 (18 dB).
// G = M^L / 2^(ACC_W - OUT_W) = 8 is the decimator's gain at DC. Every
// mechanism (weight writes, decimation strobes, constructive sum, null,
// re-steering, two-lobe weights, single-element reference) is counted and
// must occur. The top is instantiated without parameter overrides.
module tb_bsp_beamformer;
  localparam int NE = 8, NB = 2, WB = 6, M = 4;
  localparam real PI = 3.14159265358979;
  localparam real THETA = PI / 4.0;
  localparam real AMP = 0.7;
  localparam real DF = 1.0 / 512.0;   // baseband offset, cycles per sample
  localparam real G = 8.0;
  localparam int WMAX = 2 ** (WB - 1) - 1;

  logic clk = 0, rst_n = 0;
  real if_in [NE];
  logic wr_en = 0;
  logic [0:0] wr_beam = '0;
  logic [2:0] wr_elem = '0;
  logic signed [WB-1:0] wr_cos = '0, wr_sin = '0;
  logic signed [12:0] beam_i [NB];
  logic signed [12:0] beam_q [NB];
  logic beam_valid;

  int checks = 0, failures = 0;
  int n = 0;
  int wc [NB][NE], ws [NB][NE];
  int ev_write = 0, ev_valid = 0, ev_constr = 0, ev_null = 0, ev_resteer = 0, ev_twolobe = 0, ev_single = 0;
  real acc [NB];
  int cnt;
  real m_main, m_single;

  bsp_beamformer dut (.clk, .rst_n, .if_in, .wr_en, .wr_beam, .wr_elem, .wr_cos, .wr_sin,
                      .beam_i, .beam_q, .beam_valid);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && beam_valid) ev_valid++;

  function automatic int rnd(real v);
    return int'($rtoi($floor(v + 0.5)));
  endfunction

  // Expected beam magnitude for the wave with the weights of beam b.
  function automatic real expected(int b);
    real re = 0.0, im = 0.0;
    for (int k = 0; k < NE; k++) begin
      re += wc[b][k] * $cos(k * THETA) + ws[b][k] * $sin(k * THETA);
      im += ws[b][k] * $cos(k * THETA) - wc[b][k] * $sin(k * THETA);
    end
    return G * AMP / 2.0 * $sqrt(re * re + im * im);
  endfunction

  // One clock: present the next IF sample to every element.
  task automatic step();
    for (int k = 0; k < NE; k++)
      if_in[k] = AMP * $cos(PI / 2.0 * n + 2.0 * PI * DF * n + 0.3 - k * THETA);
    @(negedge clk);
    n++;
  endtask

  task automatic write_w(int b, int k, int c, int s);
    wr_en = 1; wr_beam = 1'(b); wr_elem = 3'(k); wr_cos = WB'(c); wr_sin = WB'(s);
    wc[b][k] = c; ws[b][k] = s;
    step();
    wr_en = 0;
    ev_write++;
  endtask

  task automatic steer(int b, real th);
    for (int k = 0; k < NE; k++) write_w(b, k, rnd(WMAX * $cos(k * th)), rnd(WMAX * $sin(k * th)));
  endtask

  task automatic two_lobe(int b, real t1, real t2);
    for (int k = 0; k < NE; k++)
      write_w(b, k, rnd(WMAX * ($cos(k * t1) + $cos(k * t2)) / 2.0),
                    rnd(WMAX * ($sin(k * t1) + $sin(k * t2)) / 2.0));
  endtask

  // Let the filters settle, then average the magnitude of NOUT outputs.
  task automatic measure(int nout);
    repeat (200) step();
    for (int b = 0; b < NB; b++) acc[b] = 0.0;
    cnt = 0;
    while (cnt < nout) begin
      step();
      if (beam_valid) begin
        for (int b = 0; b < NB; b++)
          acc[b] += $sqrt(real'(beam_i[b]) ** 2 + real'(beam_q[b]) ** 2);
        cnt++;
      end
    end
    for (int b = 0; b < NB; b++) acc[b] /= nout;
  endtask

  task automatic expect_main(int b, string what);
    real e;
    e = expected(b);
    checks++;
    $display("%s: beam %0d magnitude %0.1f, expected %0.1f", what, b, acc[b], e);
    if (acc[b] < 0.95 * e || acc[b] > 1.05 * e) begin
      failures++; $display("FAIL %s beam %0d", what, b);
    end
  endtask

  task automatic expect_null(int b, real ref_mag);
    checks++;
    $display("null: beam %0d magnitude %0.1f (main lobe %0.1f)", b, acc[b], ref_mag);
    if (acc[b] > 0.1 * ref_mag) begin failures++; $display("FAIL null beam %0d", b); end
    else ev_null++;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NE; k++) if_in[k] = 0.0;
    for (int b = 0; b < NB; b++) for (int k = 0; k < NE; k++) begin wc[b][k] = WMAX; ws[b][k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // A: beam 0 on the wave, beam 1 on a null
    steer(0, THETA);
    steer(1, THETA + PI / 2.0);
    measure(512);
    expect_main(0, "constructive");
    m_main = acc[0];
    ev_constr++;
    expect_null(1, acc[0]);

    // B: swap the beams while the data keeps flowing
    steer(0, THETA + PI / 2.0);
    steer(1, THETA);
    measure(512);
    expect_main(1, "re-steered");
    expect_null(0, acc[1]);
    ev_resteer++;

    // C: two-lobe weights on beam 0, a single element on beam 1
    two_lobe(0, THETA, -PI / 2.0);
    for (int k = 0; k < NE; k++) write_w(1, k, (k == 0) ? WMAX : 0, 0);
    measure(512);
    expect_main(0, "two-lobe");
    checks++;
    if (acc[0] < 0.4 * m_main || acc[0] > 0.6 * m_main) begin
      failures++; $display("FAIL two-lobe gain %0.2f of single lobe", acc[0] / m_main);
    end else ev_twolobe++;
    expect_main(1, "single element");
    m_single = acc[1];
    checks++;
    $display("array gain of 8 elements: %0.2f (%0.1f dB)", m_main / m_single, 20.0 * $log10(m_main / m_single));
    if (m_main / m_single < 7.5 || m_main / m_single > 8.5) begin
      failures++; $display("FAIL array gain");
    end else ev_single++;

    // every mechanism must have happened
    checks++;
    $display("events: writes=%0d strobes=%0d constructive=%0d nulls=%0d resteer=%0d twolobe=%0d single=%0d",
             ev_write, ev_valid, ev_constr, ev_null, ev_resteer, ev_twolobe, ev_single);
    if (ev_write == 0 || ev_valid == 0 || ev_constr == 0 || ev_null == 0 || ev_resteer == 0 ||
        ev_twolobe == 0 || ev_single == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    checks++;
    if (ev_valid * M < n - 16 || ev_valid * M > n) begin
      failures++; $display("FAIL %0d strobes in %0d clocks", ev_valid, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
