// tb_mux5_mult: exhaustive check of the 5:1 MUX multiplier for 6-bit and
// 7-bit weighting factors: for every W in the symmetric range and every
// level X in -2..+2 the output must equal the integer product W*X.
// Includes the worked example W = 27, X = 2 -> 54.
module tb_mux5_mult;
  import bsp_pkg::*;
  logic signed [5:0] w6;
  logic signed [6:0] w7;
  lvl5_t x;
  logic signed [6:0] wx6;
  logic signed [7:0] wx7;
  int checks = 0, failures = 0;

  mux5_mult #(.W_BITS(6)) dut6 (.w(w6), .x, .wx(wx6));
  mux5_mult #(.W_BITS(7)) dut7 (.w(w7), .x, .wx(wx7));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = -2; xv <= 2; xv++) begin
      for (int w = -63; w <= 63; w++) begin
        x = lvl5_t'(xv);
        w7 = 7'(w);
        w6 = 6'(w);
        #1;
        checks++;
        if (int'(wx7) != w * xv) begin
          failures++;
          $display("FAIL W7=%0d X=%0d WX=%0d", w, xv, wx7);
        end
        if (w >= -31 && w <= 31) begin
          checks++;
          if (int'(wx6) != w * xv) begin
            failures++;
            $display("FAIL W6=%0d X=%0d WX=%0d", w, xv, wx6);
          end
        end
      end
    end
    x = 3'sd2; w6 = 6'sd27; #1;
    checks++;
    if (int'(wx6) != 54) begin failures++; $display("FAIL example 27*2 = %0d", wx6); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
