// tb_ctbpdsm_model: a tone near fs/4 drives the modulator model. Checks:
// every output is a legal thermometer code; the output correlated with the
// input's own carrier over 4096 samples recovers the input's amplitude and
// phase to within 1% of a level (STF = 1 in band); and the modulation error v - u, passed
// through a moving average of 16 samples after down-conversion, stays below 0.2
// of a level (the noise is pushed away from fs/4).
module tb_ctbpdsm_model;
  localparam int NS = 4096;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  real vin;
  logic [3:0] therm;
  int checks = 0, failures = 0;
  real acc_i = 0, acc_q = 0, ref_i = 0, ref_q = 0;
  real err_i [NS], err_q [NS];

  ctbpdsm_model dut (.clk, .rst_n, .vin, .therm);

  always #5 clk = ~clk;

  function automatic real fabs(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  function automatic int lvl(logic [3:0] t);
    return int'(t[0]) + int'(t[1]) + int'(t[2]) + int'(t[3]) - 2;
  endfunction

  initial begin
    repeat (NS + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real u, c, s, amp, ph, worst, mi, mq;
  int v;

  initial begin
    vin = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    amp = 0.8; ph = 0.6; worst = 0.0;
    for (int n = 0; n < NS; n++) begin
      u = amp * $cos(PI / 2.0 * n + 2.0 * PI * n / 1024.0 + ph);
      vin = u;
      @(negedge clk);
      v = lvl(therm);
      checks++;
      if (!(therm inside {4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1111})) begin
        failures++; $display("FAIL illegal code %b", therm);
      end
      c = $cos(PI / 2.0 * n + 2.0 * PI * n / 1024.0); s = -$sin(PI / 2.0 * n + 2.0 * PI * n / 1024.0);
      acc_i += v * c; acc_q += v * s;
      ref_i += u * c; ref_q += u * s;
      err_i[n] = (v - u) * c; err_q[n] = (v - u) * s;
    end
    checks++;
    if (fabs(acc_i - ref_i) / NS > 0.01 || fabs(acc_q - ref_q) / NS > 0.01) begin
      failures++;
      $display("FAIL baseband %f %f expected %f %f", acc_i / NS, acc_q / NS, ref_i / NS, ref_q / NS);
    end
    for (int n = 16; n < NS; n++) begin
      mi = 0.0; mq = 0.0;
      for (int j = 0; j < 16; j++) begin mi += err_i[n - j]; mq += err_q[n - j]; end
      mi /= 16.0; mq /= 16.0;
      if ($sqrt(mi * mi + mq * mq) > worst) worst = $sqrt(mi * mi + mq * mq);
    end
    checks++;
    if (worst > 0.2) begin failures++; $display("FAIL in-band error %f", worst); end
    $display("baseband %f %f (input %f %f), worst filtered error %f", acc_i / NS, acc_q / NS, ref_i / NS, ref_q / NS, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
