// tb_lstm_mac: checks the two-stage MAC of the LSTM block.
//
// Streams random dot products of random length (s_load on the first pair) and
// checks that the accumulator equals the Q16.16 model exactly two cycles after
// the last pair, and that gaps with en low do not disturb it.
module tb_lstm_mac;
  import e2hrl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, s_load = 1'b0;
  fx_t a = '0, b = '0, acc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lstm_mac dut (.*);

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
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int trial = 0; trial < 300; trial++) begin
      int len;
      fx_t e;
      len = $urandom_range(12, 1);
      e = 0;
      for (int t = 0; t < len; t++) begin
        fx_t av, bv;
        av = fx_t'($urandom_range(400000, 0)) - 200000;
        bv = fx_t'($urandom_range(400000, 0)) - 200000;
        e += m(av, bv);
        en <= 1'b1; s_load <= (t == 0); a <= av; b <= bv;
        @(posedge clk);
        if ($urandom_range(3, 0) == 0) begin
          en <= 1'b0; a <= fx_t'($urandom); b <= fx_t'($urandom);
          @(posedge clk);
        end
      end
      en <= 1'b0;
      @(posedge clk);   // product stage
      #1;
      checks++;
      @(posedge clk);   // accumulate stage
      #1;
      if (acc !== e) begin
        failures++;
        $display("FAIL trial %0d: acc=%0d expected %0d", trial, acc, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
