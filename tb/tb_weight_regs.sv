// tb_weight_regs: checks the reset value (C = max, S = 0) of every register,
// then random writes against a shadow copy, including writes of the most
// negative code, which must be stored as its symmetric counterpart, and
// cycles with wr_en low, which must change nothing.
module tb_weight_regs;
  localparam int NB = 2, NE = 8, WB = 6;
  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [0:0] wr_beam;
  logic [2:0] wr_elem;
  logic signed [WB-1:0] wr_cos, wr_sin;
  logic signed [WB-1:0] w_cos [NB][NE];
  logic signed [WB-1:0] w_sin [NB][NE];
  int sh_c [NB][NE], sh_s [NB][NE];
  int checks = 0, failures = 0;

  weight_regs #(.N_BEAM(NB), .N_ELEM(NE), .W_BITS(WB)) dut (.clk, .rst_n, .wr_en, .wr_beam, .wr_elem, .wr_cos, .wr_sin, .w_cos, .w_sin);

  always #5 clk = ~clk;

  task automatic compare();
    for (int b = 0; b < NB; b++)
      for (int e = 0; e < NE; e++) begin
        checks++;
        if (int'(w_cos[b][e]) != sh_c[b][e] || int'(w_sin[b][e]) != sh_s[b][e]) begin
          failures++;
          $display("FAIL beam %0d elem %0d: %0d %0d expected %0d %0d", b, e, w_cos[b][e], w_sin[b][e], sh_c[b][e], sh_s[b][e]);
        end
      end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_beam = '0; wr_elem = '0; wr_cos = '0; wr_sin = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) for (int e = 0; e < NE; e++) begin sh_c[b][e] = 31; sh_s[b][e] = 0; end
    compare();
    for (int n = 0; n < 300; n++) begin
      int c, s, b, e;
      b = int'($urandom_range(NB - 1)); e = int'($urandom_range(NE - 1));
      c = int'($urandom_range(63)) - 32; s = int'($urandom_range(63)) - 32;
      wr_en = ($urandom_range(3) != 0);
      wr_beam = 1'(b); wr_elem = 3'(e); wr_cos = WB'(c); wr_sin = WB'(s);
      if (wr_en) begin
        sh_c[b][e] = (c == -32) ? -31 : c;
        sh_s[b][e] = (s == -32) ? -31 : s;
      end
      @(negedge clk);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
