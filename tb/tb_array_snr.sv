// tb_array_snr: array SNR improvement of a beam over a single element, the
// measure the receiver's arrays are judged by. tb_array_snr_run is run at
// the prototype II size (8 elements, 2 beams, 6-bit weights, decimation by
// 4, 1.04 GS/s: a 10 MHz band is +-39 output bins of 2048) and at the
// prototype I size (4 elements, 1 beam, 7-bit weights, decimation by 8,
// 1.06 GS/s: +-77 bins). The tone lies about 2 MHz from the band centre.
// The improvements must be 9 dB and 6 dB, each within 1.5 dB.
module tb_array_snr;
  logic clk = 0;
  logic done2, done1;
  int c2, f2, c1, f1;

  always #5 clk = ~clk;

  tb_array_snr_run #(.NE(8), .NB(2), .WB(6), .M(4), .TONE_BIN(16), .BAND(39)) run2 (
    .clk, .done(done2), .checks(c2), .failures(f2));
  tb_array_snr_run #(.NE(4), .NB(1), .WB(7), .M(8), .TONE_BIN(32), .BAND(77)) run1 (
    .clk, .done(done1), .checks(c1), .failures(f1));

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (done1 && done2);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2);
    $finish;
  end
endmodule
