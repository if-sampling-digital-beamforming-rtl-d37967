// tb_beam_pattern: beam patterns of the default receiver (8 elements,
// half-wavelength spacing, 2 simultaneous beams), swept as in a measurement:
// the incidence angle psi runs from -90 to +90 degrees in 2.5-degree steps,
// each element k sees the IF tone with phase -k*pi*sin(psi). Six steering
// angles are swept, two at a time on the two beams: 0 and +30, -30 and -60,
// +15 and +60 degrees (the angles are this testbench's choice). For every
// angle the mean output magnitude of each beam must match the ideal array
// response G*(A/2)*|sum_k W_k e^{-jk*pi*sin(psi)}| of the loaded weights
// within 10 % of the main-lobe height (the margin covers the modulator
// noise that the decimator passes, which is all that remains in a null).
// The phase advance between decimated outputs must match the offset of the
// tone from fs/4 (the down-converted frequency), and each beam's maximum
// must fall on its steering angle, within one 2.5-degree step.
// A second sweep with two-lobe weights on beam 0 (lobes at -30 and +30
// degrees) checks that both lobes appear, each about 6 dB below a single
// lobe.
module tb_beam_pattern;
  localparam int NE = 8, NB = 2, WB = 6, M = 4;
  localparam real PI = 3.14159265358979;
  localparam real AMP = 0.7;
  localparam real DF = 1.0 / 512.0;
  localparam real G = 8.0;
  localparam int WMAX = 2 ** (WB - 1) - 1;
  localparam int NPT = 73;

  logic clk = 0, rst_n = 0;
  real if_in [NE];
  logic wr_en = 0;
  logic [0:0] wr_beam = '0;
  logic [2:0] wr_elem = '0;
  logic signed [WB-1:0] wr_cos = '0, wr_sin = '0;
  logic signed [12:0] beam_i [NB];
  logic signed [12:0] beam_q [NB];
  logic beam_valid;

  int checks = 0, failures = 0, n = 0, cnt;
  int wc [NB][NE], ws [NB][NE];
  real theta, acc [NB], rot, peak [NB], main_h;
  real pat [NB][NPT];
  real pi_prev, pq_prev;

  bsp_beamformer dut (.clk, .rst_n, .if_in, .wr_en, .wr_beam, .wr_elem, .wr_cos, .wr_sin,
                      .beam_i, .beam_q, .beam_valid);

  always #5 clk = ~clk;

  function automatic int rnd(real v);
    return int'($rtoi($floor(v + 0.5)));
  endfunction

  function automatic real ideal(int b, real th);
    real re = 0.0, im = 0.0;
    for (int k = 0; k < NE; k++) begin
      re += wc[b][k] * $cos(k * th) + ws[b][k] * $sin(k * th);
      im += ws[b][k] * $cos(k * th) - wc[b][k] * $sin(k * th);
    end
    return G * AMP / 2.0 * $sqrt(re * re + im * im);
  endfunction

  task automatic step();
    for (int k = 0; k < NE; k++)
      if_in[k] = AMP * $cos(PI / 2.0 * n + 2.0 * PI * DF * n - k * theta);
    @(negedge clk);
    n++;
  endtask

  task automatic write_w(int b, int k, int c, int s);
    wr_en = 1; wr_beam = 1'(b); wr_elem = 3'(k); wr_cos = WB'(c); wr_sin = WB'(s);
    wc[b][k] = c; ws[b][k] = s;
    step();
    wr_en = 0;
  endtask

  // Settle, then average magnitudes over nout outputs; rot is the mean phase
  // advance of beam 0 per output (radians), from the conjugate products.
  task automatic measure(int nout);
    real cr, ci;
    repeat (120) step();
    foreach (acc[b]) acc[b] = 0.0;
    cnt = 0; cr = 0.0; ci = 0.0; pi_prev = 0.0; pq_prev = 0.0;
    while (cnt < nout) begin
      step();
      if (beam_valid) begin
        for (int b = 0; b < NB; b++) acc[b] += $sqrt(real'(beam_i[b]) ** 2 + real'(beam_q[b]) ** 2);
        if (cnt > 0) begin
          cr += real'(beam_i[0]) * pi_prev + real'(beam_q[0]) * pq_prev;
          ci += real'(beam_q[0]) * pi_prev - real'(beam_i[0]) * pq_prev;
        end
        pi_prev = real'(beam_i[0]); pq_prev = real'(beam_q[0]);
        cnt++;
      end
    end
    foreach (acc[b]) acc[b] /= nout;
    rot = $atan2(ci, cr);
  endtask

  int best [NB];

  task automatic sweep(string name, int nbeams);
    for (int b = 0; b < NB; b++) begin peak[b] = 0.0; best[b] = 0; end
    for (int p = 0; p < NPT; p++) begin
      real psi;
      psi = -90.0 + 2.5 * p;
      theta = PI * $sin(psi * PI / 180.0);
      measure(64);
      for (int b = 0; b < nbeams; b++) begin
        real e;
        e = ideal(b, theta);
        pat[b][p] = acc[b];
        if (acc[b] > peak[b]) begin peak[b] = acc[b]; best[b] = p; end
        checks++;
        if (acc[b] - e > 0.1 * main_h || e - acc[b] > 0.1 * main_h) begin
          failures++;
          $display("FAIL %s beam %0d psi=%0.1f: %0.1f, ideal %0.1f", name, b, psi, acc[b], e);
        end
      end
      if (p % 12 == 0)
        $display("%s psi=%6.1f  beam0 %6.1f (ideal %6.1f)  beam1 %6.1f (ideal %6.1f)", name, psi,
                 acc[0], ideal(0, theta), acc[1], ideal(1, theta));
      if (ideal(0, theta) > 0.5 * main_h) begin
        checks++;
        if (rot - 2.0 * PI * DF * M > 0.02 || 2.0 * PI * DF * M - rot > 0.02) begin
          failures++;
          $display("FAIL %s output rotation %f rad per output, expected %f", name, rot, 2.0 * PI * DF * M);
        end
      end
    end
    for (int b = 0; b < nbeams; b++)
      $display("%s beam %0d: maximum %0.1f at %0.1f degrees", name, b, peak[b], -90.0 + 2.5 * best[b]);
  endtask

  // Weights e^{jk*pi*sin(psi)} steer beam b to psi degrees.
  task automatic steer(int b, real psi);
    real th;
    th = PI * $sin(psi * PI / 180.0);
    for (int k = 0; k < NE; k++) write_w(b, k, rnd(WMAX * $cos(k * th)), rnd(WMAX * $sin(k * th)));
  endtask

  // Steers the two beams to psi0 and psi1, sweeps, and checks where the
  // maxima lie.
  task automatic single_pair(real psi0, real psi1);
    real want [NB];
    want[0] = psi0; want[1] = psi1;
    steer(0, psi0);
    steer(1, psi1);
    sweep($sformatf("single %0.0f/%0.0f", psi0, psi1), 2);
    for (int b = 0; b < NB; b++) begin
      real got;
      got = -90.0 + 2.5 * best[b];
      checks++;
      if (got - want[b] > 2.6 || want[b] - got > 2.6) begin
        failures++;
        $display("FAIL beam %0d maximum at %0.1f degrees, steered to %0.1f", b, got, want[b]);
      end
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    theta = 0.0;
    for (int k = 0; k < NE; k++) if_in[k] = 0.0;
    for (int b = 0; b < NB; b++) for (int k = 0; k < NE; k++) begin wc[b][k] = WMAX; ws[b][k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    main_h = G * AMP / 2.0 * NE * WMAX;
    single_pair(-30.0, -60.0);
    single_pair(15.0, 60.0);
    single_pair(0.0, 30.0);

    // two-lobe weights on beam 0: lobes at -30 and +30 degrees
    for (int k = 0; k < NE; k++)
      write_w(0, k, rnd(WMAX * ($cos(k * PI / 2.0) + $cos(-k * PI / 2.0)) / 2.0),
                    rnd(WMAX * ($sin(k * PI / 2.0) + $sin(-k * PI / 2.0)) / 2.0));
    sweep("two-lobe", 1);
    checks++;
    if (pat[0][24] < 0.4 * main_h || pat[0][48] < 0.4 * main_h || pat[0][24] > 0.6 * main_h || pat[0][48] > 0.6 * main_h) begin
      failures++;
      $display("FAIL two lobes: %0.1f at -30, %0.1f at +30 degrees (single lobe %0.1f)", pat[0][24], pat[0][48], main_h);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
