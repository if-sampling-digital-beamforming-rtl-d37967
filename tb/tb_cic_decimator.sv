// tb_cic_decimator: the decimator is compared with a direct-form FIR model.
// The reference convolves the input with the impulse response of
// ((1 - z^-M)/(1 - z^-1))^L, built by repeated convolution of an M-tap box,
// keeps every M-th result and rounds away the low ACC_W - OUT_W bits
// (half up).
// Two instances are checked with the same random 10-bit input, including
// full-scale stretches: M = 4 (prototype II) and M = 8 (prototype I), L = 5.
// out_valid must pulse exactly once every M clocks, and the output of the
// pulse at clock t must be the filter result for input sample t - L.
module tb_cic_decimator;
  localparam int L = 5, IN_W = 10, OUT_W = 13, NS = 3000;
  logic clk = 0, rst_n = 0;
  logic signed [IN_W-1:0] din;
  logic signed [OUT_W-1:0] dout4, dout8;
  logic v4, v8;
  int checks = 0, failures = 0;
  longint xs [NS];
  longint h4 [], h8 [];
  int last4 = -1, last8 = -1, n4 = 0, n8 = 0;

  cic_decimator #(.IN_W(IN_W), .OUT_W(OUT_W), .L(L), .M(4)) dut4 (.clk, .rst_n, .din, .dout(dout4), .out_valid(v4));
  cic_decimator #(.IN_W(IN_W), .OUT_W(OUT_W), .L(L), .M(8)) dut8 (.clk, .rst_n, .din, .dout(dout8), .out_valid(v8));

  always #5 clk = ~clk;

  function automatic void make_h(int m, ref longint h []);
    longint t [];
    h = new[1]; h[0] = 1;
    for (int s = 0; s < L; s++) begin
      t = new[h.size() + m - 1];
      foreach (t[k]) t[k] = 0;
      foreach (h[k]) for (int j = 0; j < m; j++) t[k + j] += h[k];
      h = t;
    end
  endfunction

  function automatic longint ref_out(int t, int m, ref longint h []);
    longint acc = 0;
    int shift;
    shift = L * $clog2(m) + IN_W - OUT_W;
    for (int j = 0; j < h.size(); j++) if (t - j >= 0) acc += h[j] * xs[t - j];
    return (acc + (longint'(1) <<< (shift - 1))) >>> shift;
  endfunction

  initial begin
    repeat (NS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    make_h(4, h4);
    make_h(8, h8);
    for (int t = 0; t < NS; t++) begin
      if (t >= 1000 && t < 1200)      xs[t] = 511;
      else if (t >= 1200 && t < 1400) xs[t] = -512;
      else                            xs[t] = longint'($urandom_range(1023)) - 512;
    end
    din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NS; t++) begin
      din = IN_W'(xs[t]);
      @(negedge clk);                 // edge t has happened
      if (v4) begin
        checks++;
        n4++;
        if (last4 >= 0 && t - last4 != 4) begin failures++; $display("FAIL M=4 strobe spacing %0d", t - last4); end
        if (t >= L && longint'(dout4) != ref_out(t - L, 4, h4)) begin
          failures++;
          $display("FAIL M=4 t=%0d dout=%0d expected %0d", t, dout4, ref_out(t - L, 4, h4));
        end
        last4 = t;
      end
      if (v8) begin
        checks++;
        n8++;
        if (last8 >= 0 && t - last8 != 8) begin failures++; $display("FAIL M=8 strobe spacing %0d", t - last8); end
        if (t >= L && longint'(dout8) != ref_out(t - L, 8, h8)) begin
          failures++;
          $display("FAIL M=8 t=%0d dout=%0d expected %0d", t, dout8, ref_out(t - L, 8, h8));
        end
        last8 = t;
      end
    end
    checks++;
    if (n4 != NS / 4 || n8 != NS / 8) begin
      failures++;
      $display("FAIL output counts %0d %0d", n4, n8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
