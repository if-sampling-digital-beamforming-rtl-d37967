// tb_therm2bin: exhaustive check of the thermometer-to-binary summer.
// Every legal thermometer code 0000, 0001, 0011, 0111, 1111 must map to the
// signed levels -2, -1, 0, +1, +2 (number of ones minus two).
module tb_therm2bin;
  import bsp_pkg::*;
  logic [3:0] therm;
  lvl5_t level;
  int checks = 0, failures = 0;

  therm2bin dut (.therm, .level);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ones = 0; ones <= 4; ones++) begin
      therm = 4'((1 << ones) - 1);
      #1;
      checks++;
      if (int'(level) != ones - 2) begin
        failures++;
        $display("FAIL therm=%b level=%0d expected %0d", therm, level, ones - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
