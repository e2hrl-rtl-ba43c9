// tb_fc_addr_gen: runs the dense-layer address generator on several layer
// shapes (including a partial last group) and compares the issued taps and
// write-backs with the expected order (per group: bias tap, then inputs
// 0..in-1; then one write per valid lane). Checks the cycle count
// groups*(in + 2 + N_PE).
module tb_fc_addr_gen;
  import e2hrl_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  layer_cfg_t cfg;
  ag_rd_t rd;
  ag_wb_t wb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fc_addr_gen #(.N_PE(N)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_layer(int nin, int nout, int sb, int db, int wbase);
    int cyc, exp_cyc, nrd, nwb, g, t, lane;
    cfg = make_layer(K_FC, 1'b1, M_FEAT, M_FEAT, 1, 1, nin, 1, 1, nout, 0, 0, sb, db, wbase);
    exp_cyc = ((nout + N - 1) / N) * (nin + 2 + N);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0; nrd = 0; nwb = 0;
    forever begin
      #1;
      if (done) break;
      if (rd.valid) begin
        g = nrd / (nin + 1); t = nrd % (nin + 1);
        checks++;
        if (rd.first !== (t == 0) || rd.bias !== (t == 0) || rd.pad !== 1'b0 ||
            32'(rd.waddr) != wbase + nrd || (t > 0 && 32'(rd.faddr) != sb + t - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL tap %0d: fa=%0d wa=%0d", nrd, rd.faddr, rd.waddr);
        end
        nrd++;
      end
      if (wb.valid) begin
        checks++;
        lane = nwb % N;
        if (32'(wb.lane) != lane || 32'(wb.addr) != db + nwb) begin
          failures++;
          if (failures < 10) $display("FAIL wb %0d: lane %0d addr %0d", nwb, wb.lane, wb.addr);
        end
        nwb++;
      end
      @(posedge clk);
      cyc++;
    end
    checks += 3;
    if (nrd != ((nout + N - 1) / N) * (nin + 1)) begin failures++; $display("FAIL taps %0d", nrd); end
    if (nwb != nout) begin failures++; $display("FAIL writes %0d", nwb); end
    if (cyc != exp_cyc) begin failures++; $display("FAIL %0d cycles, expected %0d", cyc, exp_cyc); end
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_layer(10, 8, 30, 200, 3);
    run_layer(5, 3, 0, 0, 0);     // fewer outputs than PEs
    run_layer(7, 9, 12, 40, 100); // partial last group
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
