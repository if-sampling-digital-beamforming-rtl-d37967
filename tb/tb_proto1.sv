// tb_proto1: the receiver at the thesis' prototype I size: 4 elements,
// 1 beam, 7-bit weighting factors (496 phase steps), decimation by 8.
// A wave with a 90-degree phase step between elements (30 degrees incidence
// on a half-wavelength array) is received; the single beam is, in turn,
// steered at it, steered to a null, given two-lobe weights, and reduced to
// element 0 alone. Each mean output magnitude must match
// G*(A/2)*|sum_k W_k e^{-jk*THETA}| within 5 % (null: below 10 % of the main
// lobe), and the four-element array gain over one element must be near 4
// (12 dB). G = 8^5 / 2^12 = 8 is the decimator's DC gain at this size.
// Finally beam patterns are swept as in a measurement: the beam is steered
// to -45, -15, +15 and +45 degrees in turn (four angles, this testbench's
// choice), and for each the incidence angle psi runs from -90 to +90 degrees
// in 2.5-degree steps, each element k seeing the tone with phase
// -k*pi*sin(psi). Every point must match the ideal response within 10 % of
// the main lobe, and the maximum must lie within one step of the steering
// angle.
module tb_proto1;
  localparam int NE = 4, WB = 7, M = 8;
  localparam real PI = 3.14159265358979;
  localparam real THETA = PI / 2.0;
  localparam real AMP = 0.7;
  localparam real DF = 1.0 / 1024.0;
  localparam real G = 8.0;
  localparam int WMAX = 2 ** (WB - 1) - 1;
  localparam int NPT = 73;

  logic clk = 0, rst_n = 0;
  real if_in [NE];
  logic wr_en = 0;
  logic [0:0] wr_beam = '0;
  logic [1:0] wr_elem = '0;
  logic signed [WB-1:0] wr_cos = '0, wr_sin = '0;
  logic signed [12:0] beam_i [1];
  logic signed [12:0] beam_q [1];
  logic beam_valid;

  int checks = 0, failures = 0, n = 0, cnt;
  int wc [NE], ws [NE];
  real acc, m_main, m_single;
  real theta = THETA;  // phase step of the received wave

  bsp_beamformer #(.N_ELEM(NE), .N_BEAM(1), .W_BITS(WB), .DEC_M(M)) dut (
    .clk, .rst_n, .if_in, .wr_en, .wr_beam, .wr_elem, .wr_cos, .wr_sin,
    .beam_i, .beam_q, .beam_valid);

  always #5 clk = ~clk;

  function automatic int rnd(real v);
    return int'($rtoi($floor(v + 0.5)));
  endfunction

  function automatic real expected();
    real re = 0.0, im = 0.0;
    for (int k = 0; k < NE; k++) begin
      re += wc[k] * $cos(k * theta) + ws[k] * $sin(k * theta);
      im += ws[k] * $cos(k * theta) - wc[k] * $sin(k * theta);
    end
    return G * AMP / 2.0 * $sqrt(re * re + im * im);
  endfunction

  task automatic step();
    for (int k = 0; k < NE; k++)
      if_in[k] = AMP * $cos(PI / 2.0 * n + 2.0 * PI * DF * n + 1.1 - k * theta);
    @(negedge clk);
    n++;
  endtask

  task automatic write_w(int k, int c, int s);
    wr_en = 1; wr_elem = 2'(k); wr_cos = WB'(c); wr_sin = WB'(s);
    wc[k] = c; ws[k] = s;
    step();
    wr_en = 0;
  endtask

  task automatic measure(int nout, int settle = 300);
    repeat (settle) step();
    acc = 0.0; cnt = 0;
    while (cnt < nout) begin
      step();
      if (beam_valid) begin
        acc += $sqrt(real'(beam_i[0]) ** 2 + real'(beam_q[0]) ** 2);
        cnt++;
      end
    end
    acc /= nout;
  endtask

  task automatic expect_main(string what);
    real e;
    e = expected();
    checks++;
    $display("%s: magnitude %0.1f, expected %0.1f", what, acc, e);
    if (acc < 0.95 * e || acc > 1.05 * e) begin failures++; $display("FAIL %s", what); end
  endtask

  // Steers the beam to psi_s degrees and sweeps the incidence angle.
  task automatic pattern(real psi_s, real main_h);
    real th, psi, e, peak;
    int best;
    th = PI * $sin(psi_s * PI / 180.0);
    for (int k = 0; k < NE; k++) write_w(k, rnd(WMAX * $cos(k * th)), rnd(WMAX * $sin(k * th)));
    peak = 0.0; best = 0;
    for (int p = 0; p < NPT; p++) begin
      psi = -90.0 + 2.5 * p;
      theta = PI * $sin(psi * PI / 180.0);
      measure(48, 120);
      e = expected();
      if (acc > peak) begin peak = acc; best = p; end
      checks++;
      if (acc - e > 0.1 * main_h || e - acc > 0.1 * main_h) begin
        failures++;
        $display("FAIL pattern steered to %0.1f, psi=%0.1f: %0.1f, ideal %0.1f", psi_s, psi, acc, e);
      end
    end
    psi = -90.0 + 2.5 * best;
    $display("pattern steered to %0.1f degrees: maximum %0.1f at %0.1f degrees", psi_s, peak, psi);
    checks++;
    if (psi - psi_s > 2.6 || psi_s - psi > 2.6) begin failures++; $display("FAIL pattern maximum"); end
  endtask

  initial begin
    repeat (260000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NE; k++) begin if_in[k] = 0.0; wc[k] = WMAX; ws[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int k = 0; k < NE; k++) write_w(k, rnd(WMAX * $cos(k * THETA)), rnd(WMAX * $sin(k * THETA)));
    measure(256);
    expect_main("constructive");
    m_main = acc;

    for (int k = 0; k < NE; k++) write_w(k, rnd(WMAX * $cos(k * (THETA + PI / 2.0))), rnd(WMAX * $sin(k * (THETA + PI / 2.0))));
    measure(256);
    checks++;
    $display("null: magnitude %0.1f", acc);
    if (acc > 0.1 * m_main) begin failures++; $display("FAIL null"); end

    for (int k = 0; k < NE; k++)
      write_w(k, rnd(WMAX * ($cos(k * THETA) + $cos(-k * PI / 4.0)) / 2.0),
                 rnd(WMAX * ($sin(k * THETA) + $sin(-k * PI / 4.0)) / 2.0));
    measure(256);
    expect_main("two-lobe");

    for (int k = 0; k < NE; k++) write_w(k, (k == 0) ? WMAX : 0, 0);
    measure(256);
    expect_main("single element");
    m_single = acc;
    checks++;
    $display("array gain of 4 elements: %0.2f (%0.1f dB)", m_main / m_single, 20.0 * $log10(m_main / m_single));
    if (m_main / m_single < 3.7 || m_main / m_single > 4.3) begin failures++; $display("FAIL array gain"); end

    pattern(-45.0, m_main);
    pattern(-15.0, m_main);
    pattern(15.0, m_main);
    pattern(45.0, m_main);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
