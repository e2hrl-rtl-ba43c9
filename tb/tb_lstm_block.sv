// tb_lstm_block: LSTM time steps through the LSTM block, sequenced by
// lstm_addr_gen, with IN = 5 and HID = 4 (so the kernel MAC has more taps than
// the recurrent one). Random kernel, recurrent kernel and bias memories are
// loaded, x_t comes from a small memory model with one cycle of latency, and
// every h_t element written out is compared with a model of
// i,f,o = hardsigmoid(.), g = hardtanh(.), c = f*c + i*g, h = hardtanh(c)*o
// computed here. Four steps, then state_clear, then two more steps; the number
// of cycles per step is checked against HID*(4*(max(IN,HID)+6)+1) + 1.
module tb_lstm_block;
  import e2hrl_pkg::*;
  localparam int IN = 5, HID = 4;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, state_clear = 1'b0;
  lstm_ag_t ag;
  logic [7:0] x_addr, h_addr;
  fx_t x_data, h_data;
  logic h_we;
  logic ld_we = 1'b0;
  logic [1:0] ld_sel = '0;
  logic [ADDR_W-1:0] ld_addr = '0;
  fx_t ld_data = '0;
  int checks = 0, failures = 0, n_sat = 0;

  fx_t xmem [IN];
  fx_t kern [4*HID*IN], recw [4*HID*HID], bias [4*HID];
  fx_t h [HID], c [HID], h_exp [HID];

  always #5 clk = ~clk;

  lstm_addr_gen #(.IN(IN), .HID(HID)) u_ag (.clk, .rst_n, .start, .busy, .ag);
  lstm_block #(.IN(IN), .HID(HID)) dut (.*);

  always_ff @(posedge clk) x_data <= xmem[x_addr < IN ? x_addr : 0];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fx_t m(fx_t a, fx_t b);
    longint p;
    p = longint'(a) * longint'(b);
    return fx_t'(p >>> 16);
  endfunction
  function automatic fx_t hs(fx_t v);
    if (v < -163840 || v > 163840) n_sat++;
    if (v < -163840) return 0;
    if (v > 163840) return 65536;
    return m(v, 13107) + 32768;
  endfunction
  function automatic fx_t ht(fx_t v);
    if (v < -65536) return -65536;
    if (v > 65536) return 65536;
    return v;
  endfunction

  task automatic ld(logic [1:0] sel, int a, fx_t d);
    ld_we <= 1'b1; ld_sel <= sel; ld_addr <= ADDR_W'(a); ld_data <= d;
    @(posedge clk);
  endtask

  task automatic step();
    int cyc, seen;
    foreach (xmem[i]) xmem[i] = fx_t'($urandom_range(131072, 0)) - 65536;
    for (int j = 0; j < HID; j++) begin
      fx_t g [4];
      for (int q = 0; q < 4; q++) begin
        fx_t s;
        s = bias[q*HID+j];
        for (int t = 0; t < IN; t++) s += m(kern[(q*HID+j)*IN+t], xmem[t]);
        for (int t = 0; t < HID; t++) s += m(recw[(q*HID+j)*HID+t], h[t]);
        g[q] = (q == 3) ? ht(s) : hs(s);
      end
      c[j] = m(g[1], c[j]) + m(g[0], g[3]);
      h_exp[j] = m(ht(c[j]), g[2]);
    end
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 1; seen = 0;
    forever begin
      #1;
      if (h_we) begin
        checks++;
        if (h_data !== h_exp[h_addr]) begin
          failures++;
          $display("FAIL h[%0d]=%0d expected %0d", h_addr, h_data, h_exp[h_addr]);
        end
        seen++;
      end
      if (ag.done) break;
      @(posedge clk);
      cyc++;
    end
    h = h_exp;
    checks += 2;
    if (seen != HID) begin failures++; $display("FAIL %0d outputs", seen); end
    if (cyc != HID * (4 * (IN + 6) + 1) + 1) begin
      failures++;
      $display("FAIL step took %0d cycles", cyc);
    end
    @(posedge clk);
  endtask

  initial begin
    foreach (h[i]) begin h[i] = 0; c[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    foreach (kern[i]) begin kern[i] = fx_t'($urandom_range(131072, 0)) - 65536; ld(2'd0, i, kern[i]); end
    foreach (recw[i]) begin recw[i] = fx_t'($urandom_range(131072, 0)) - 65536; ld(2'd1, i, recw[i]); end
    foreach (bias[i]) begin bias[i] = fx_t'($urandom_range(400000, 0)) - 200000; ld(2'd2, i, bias[i]); end
    ld_we <= 1'b0;
    @(posedge clk);
    repeat (4) step();
    state_clear <= 1'b1;
    @(posedge clk);
    state_clear <= 1'b0;
    foreach (h[i]) begin h[i] = 0; c[i] = 0; end
    repeat (2) step();
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no saturated gate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
