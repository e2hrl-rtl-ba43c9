// tb_lstm_addr_gen: cycle-by-cycle check of the LSTM address generator with
// IN = 3, HID = 2. The expected control word of every cycle is built here:
// per unit j and gate q (i, f, o, g) max(IN, HID) taps with kernel address
// (q*HID+j)*IN+t and recurrent address (q*HID+j)*HID+t, two drain cycles, three
// sum_stb cycles with S1 = MAC1, MAC2, bias, one
// act_stb cycle with the gate and bias address q*HID+j; after gate g a cell_stb
// cycle for unit j; done at the end. Run twice to check the restart.
module tb_lstm_addr_gen;
  import e2hrl_pkg::*;
  localparam int IN = 3, HID = 2, TL = 3;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy;
  lstm_ag_t ag;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lstm_addr_gen #(.IN(IN), .HID(HID)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lstm_ag_t exp_q [$];

  task automatic build();
    lstm_ag_t e;
    exp_q.delete();
    for (int j = 0; j < HID; j++) begin
      for (int q = 0; q < 4; q++) begin
        for (int t = 0; t < TL; t++) begin
          e = '0;
          e.valid = 1; e.first = (t == 0); e.xv = (t < IN); e.hv = (t < HID);
          e.kaddr = ADDR_W'((q * HID + j) * IN + t);
          e.raddr = ADDR_W'((q * HID + j) * HID + t);
          e.tidx = 8'(t);
          exp_q.push_back(e);
        end
        e = '0; exp_q.push_back(e); exp_q.push_back(e);
        for (int s = 0; s < 3; s++) begin
          e = '0; e.sum_stb = 1; e.sum_sel = 2'(s);
          exp_q.push_back(e);
        end
        e = '0; e.act_stb = 1; e.gate = 2'(q); e.baddr = ADDR_W'(q * HID + j);
        exp_q.push_back(e);
      end
      e = '0; e.cell_stb = 1; e.unit = 8'(j);
      exp_q.push_back(e);
    end
    e = '0; e.done = 1;
    exp_q.push_back(e);
  endtask

  task automatic run();
    build();
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    foreach (exp_q[k]) begin
      lstm_ag_t e;
      logic bad;
      #1;
      e = exp_q[k];
      bad = (ag.valid !== e.valid) || (ag.first !== e.first) || (ag.xv !== e.xv) ||
            (ag.hv !== e.hv) || (ag.act_stb !== e.act_stb) || (ag.cell_stb !== e.cell_stb) ||
            (ag.sum_stb !== e.sum_stb) || (ag.sum_sel !== e.sum_sel) ||
            (ag.done !== e.done);
      if (e.valid) bad |= (ag.kaddr !== e.kaddr) || (ag.raddr !== e.raddr) || (ag.tidx !== e.tidx);
      if (e.act_stb) bad |= (ag.gate !== e.gate) || (ag.baddr !== e.baddr);
      if (e.cell_stb) bad |= (ag.unit !== e.unit);
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: got %p expected %p", k, ag, e);
      end
      @(posedge clk);
    end
    #1;
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    // cycle count formula: HID*(4*(TL+6)+1) cycles before done
    checks++;
    if (exp_q.size() - 1 != HID * (4 * (TL + 6) + 1)) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run();
    repeat (3) @(posedge clk);
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
