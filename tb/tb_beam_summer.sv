// tb_beam_summer: random element words, including all-extreme vectors, for
// the 8 x 7-bit (prototype II) and 4 x 8-bit (prototype I) summers; the
// registered 10-bit sum must equal the integer sum one clock later.
module tb_beam_summer;
  logic clk = 0, rst_n = 0;
  logic signed [6:0] d8 [8];
  logic signed [7:0] d4 [4];
  logic signed [9:0] s8, s4;
  int checks = 0, failures = 0;
  int e8, e4;

  beam_summer #(.N_IN(8), .IN_W(7)) dut8 (.clk, .rst_n, .din(d8), .sum(s8));
  beam_summer #(.N_IN(4), .IN_W(8)) dut4 (.clk, .rst_n, .din(d4), .sum(s4));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (d8[k]) d8[k] = '0;
    foreach (d4[k]) d4[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      e8 = 0; e4 = 0;
      for (int k = 0; k < 8; k++) begin
        int v;
        v = (n == 0) ? 62 : (n == 1) ? -62 : int'($urandom_range(124)) - 62;
        d8[k] = 7'(v); e8 += v;
      end
      for (int k = 0; k < 4; k++) begin
        int v;
        v = (n == 0) ? 126 : (n == 1) ? -126 : int'($urandom_range(252)) - 126;
        d4[k] = 8'(v); e4 += v;
      end
      @(negedge clk);
      checks += 2;
      if (int'(s8) != e8) begin failures++; $display("FAIL 8x7 sum=%0d expected %0d", s8, e8); end
      if (int'(s4) != e4) begin failures++; $display("FAIL 4x8 sum=%0d expected %0d", s4, e4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
