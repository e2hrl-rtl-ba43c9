// tb_hard_act: checks hard tanh and hard sigmoid at the breakpoints, inside
// each linear segment and in both saturated regions, against values computed
// here from the definitions (Q16.16, 0.2 represented as 13107/65536).
module tb_hard_act;
  import e2hrl_pkg::*;
  logic s_tanh;
  fx_t x, y;
  int checks = 0, failures = 0;

  hard_act dut (.*);

  function automatic fx_t ref_sig(fx_t v);
    longint p;
    if (v < -163840) return 0;
    if (v > 163840) return 65536;
    p = longint'(v) * 13107;
    return fx_t'(p >>> 16) + 32768;
  endfunction

  function automatic fx_t ref_tanh(fx_t v);
    if (v < -65536) return -65536;
    if (v > 65536) return 65536;
    return v;
  endfunction

  task automatic check(bit t, fx_t v);
    fx_t e;
    s_tanh = t; x = v;
    #1;
    e = t ? ref_tanh(v) : ref_sig(v);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL tanh=%0b x=%0d y=%0d expected %0d", t, v, y, e);
    end
  endtask

  initial begin
    fx_t pts [14];
    pts = '{0, 65536, -65536, 65537, -65537, 163840, -163840, 163841, -163841,
            32768, -32768, 1000000, -1000000, 98304};
    foreach (pts[i]) begin check(1'b0, pts[i]); check(1'b1, pts[i]); end
    // fixed spot values from the definitions
    s_tanh = 1'b0; x = 0; #1; checks++; if (y !== 32768) failures++;
    s_tanh = 1'b0; x = 300000; #1; checks++; if (y !== 65536) failures++;
    s_tanh = 1'b1; x = -300000; #1; checks++; if (y !== -65536) failures++;
    repeat (2000) begin
      check($urandom_range(1, 0), fx_t'($urandom_range(600000, 0)) - 300000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
