// tb_ddc_mux: random five-level samples are down-converted with the LO
// sequence of n = 0, 1, 2, ...; each output must equal i = cos[n*pi/2]*x and
// q = -sin[n*pi/2]*x one clock after the sample, with q_phase set on odd n.
module tb_ddc_mux;
  import bsp_pkg::*;
  logic clk = 0, rst_n = 0;
  lvl5_t x, i_out, q_out;
  logic signed [1:0] lo_cos, lo_sin;
  logic q_phase;
  int checks = 0, failures = 0;
  int exp_i, exp_q, exp_ph;
  localparam real PI = 3.14159265358979;

  ddc_mux dut (.clk, .rst_n, .x, .lo_cos, .lo_sin, .i_out, .q_out, .q_phase);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; lo_cos = 2'sd1; lo_sin = 2'sd0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int c, s, xv;
      c  = int'($rtoi($floor($cos(n * PI / 2.0) + 0.5)));
      s  = int'($rtoi($floor($sin(n * PI / 2.0) + 0.5)));
      xv = int'($urandom_range(4)) - 2;
      x = lvl5_t'(xv); lo_cos = 2'(c); lo_sin = 2'(s);
      exp_i = c * xv; exp_q = -s * xv; exp_ph = n % 2;
      @(negedge clk);
      checks++;
      if (int'(i_out) != exp_i || int'(q_out) != exp_q || int'(q_phase) != exp_ph) begin
        failures++;
        $display("FAIL n=%0d x=%0d i=%0d q=%0d ph=%0d expected %0d %0d %0d",
                 n, xv, i_out, q_out, q_phase, exp_i, exp_q, exp_ph);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
