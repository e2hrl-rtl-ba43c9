// tb_pe_array: random dot products through a 4-lane PE array.
//
// Each trial streams a random number of taps (first tap with s_load) of a shared
// operand and per-lane weights, then compares every lane's output, with and
// without ReLU, against a Q16.16 model computed here. Checks that one MAC per
// cycle is taken (output valid the cycle after the last tap).
module tb_pe_array;
  import e2hrl_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, s_load = 1'b0, relu_en = 1'b0;
  fx_t a = '0;
  fx_t w [N];
  fx_t y [N];
  int checks = 0, failures = 0, n_neg = 0;

  always #5 clk = ~clk;

  pe_array #(.N_PE(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fx_t m(fx_t x, fx_t v);
    longint p;
    p = longint'(x) * longint'(v);
    return fx_t'(p >>> 16);
  endfunction

  initial begin
    fx_t acc [N];
    foreach (w[i]) w[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int trial = 0; trial < 200; trial++) begin
      int len;
      bit r;
      len = $urandom_range(20, 1);
      r = $urandom_range(1, 0);
      foreach (acc[i]) acc[i] = 0;
      for (int t = 0; t < len; t++) begin
        fx_t av;
        av = fx_t'($urandom_range(200000, 0)) - 100000;
        en <= 1'b1; s_load <= (t == 0); relu_en <= r; a <= av;
        for (int i = 0; i < N; i++) begin
          fx_t wv;
          wv = fx_t'($urandom_range(200000, 0)) - 100000;
          w[i] <= wv;
          acc[i] += m(av, wv);
        end
        @(posedge clk);
      end
      en <= 1'b0;
      // an idle cycle between trials must not change the result
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        fx_t e;
        e = (r && acc[i] < 0) ? 0 : acc[i];
        if (acc[i] < 0) n_neg++;
        checks++;
        if (y[i] !== e) begin
          failures++;
          $display("FAIL trial %0d lane %0d: %0d expected %0d", trial, i, y[i], e);
        end
      end
    end
    checks++;
    if (n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
