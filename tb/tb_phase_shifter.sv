// tb_phase_shifter: random down-converted streams (i or q zero on alternate
// samples, as the DDC delivers them) and random weights; outputs must equal
// the complex product (C + jS)(i + jq): I' = C*i - S*q, Q' = S*i + C*q,
// one clock after the inputs.
module tb_phase_shifter;
  import bsp_pkg::*;
  localparam int WB = 6;
  logic clk = 0, rst_n = 0;
  lvl5_t i_in, q_in;
  logic q_phase;
  logic signed [WB-1:0] w_cos, w_sin;
  logic signed [WB:0] i_out, q_out;
  int checks = 0, failures = 0;
  int exp_i, exp_q;

  phase_shifter #(.W_BITS(WB)) dut (.clk, .rst_n, .i_in, .q_in, .q_phase, .w_cos, .w_sin, .i_out, .q_out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i_in = '0; q_in = '0; q_phase = 0; w_cos = '0; w_sin = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int iv, qv, c, s;
      c = int'($urandom_range(62)) - 31;
      s = int'($urandom_range(62)) - 31;
      if (n % 2 == 0) begin iv = int'($urandom_range(4)) - 2; qv = 0; end
      else            begin iv = 0; qv = int'($urandom_range(4)) - 2; end
      i_in = lvl5_t'(iv); q_in = lvl5_t'(qv); q_phase = n[0];
      w_cos = WB'(c); w_sin = WB'(s);
      exp_i = c * iv - s * qv;
      exp_q = s * iv + c * qv;
      @(negedge clk);
      checks++;
      if (int'(i_out) != exp_i || int'(q_out) != exp_q) begin
        failures++;
        $display("FAIL n=%0d i=%0d q=%0d C=%0d S=%0d -> %0d %0d expected %0d %0d",
                 n, iv, qv, c, s, i_out, q_out, exp_i, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
