// tb_dbf_core: runs the bit-exact dbf_core check of tb_dbf_core_run at the
// prototype II size (8 elements, 2 beams, 6-bit weights, M = 4) and at the
// prototype I size (4 elements, 1 beam, 7-bit weights, M = 8).
module tb_dbf_core;
  logic clk = 0;
  logic done2, done1;
  int c2, f2, c1, f1;

  always #5 clk = ~clk;

  tb_dbf_core_run #(.NE(8), .NB(2), .WB(6), .M(4)) run2 (.clk, .done(done2), .checks(c2), .failures(f2));
  tb_dbf_core_run #(.NE(4), .NB(1), .WB(7), .M(8)) run1 (.clk, .done(done1), .checks(c1), .failures(f1));

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (done1 && done2);
    $display("prototype II run: %0d checks, prototype I run: %0d checks", c2, c1);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2);
    $finish;
  end
endmodule
