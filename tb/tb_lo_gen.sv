// tb_lo_gen: the LO sequencer must produce cos[n*pi/2] and sin[n*pi/2]
// (rounded real cosine and sine) for n = 0, 1, 2, ... counted from reset,
// repeating every four clocks.
module tb_lo_gen;
  import bsp_pkg::*;
  logic clk = 0, rst_n = 0;
  lo_phase_t phase;
  logic signed [1:0] lo_cos, lo_sin;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  lo_gen dut (.clk, .rst_n, .phase, .lo_cos, .lo_sin);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      int ec, es;
      ec = int'($rtoi($floor($cos(n * PI / 2.0) + 0.5)));
      es = int'($rtoi($floor($sin(n * PI / 2.0) + 0.5)));
      checks++;
      if (int'(lo_cos) != ec || int'(lo_sin) != es || int'(phase) != n % 4) begin
        failures++;
        $display("FAIL n=%0d cos=%0d sin=%0d phase=%0d expected %0d %0d %0d",
                 n, lo_cos, lo_sin, phase, ec, es, n % 4);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
