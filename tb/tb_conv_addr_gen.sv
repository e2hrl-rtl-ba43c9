// tb_conv_addr_gen: runs the convolution address generator on small layers
// (odd sizes, a partial last channel group) and compares the full stream of
// issued taps (feature address, weight address, first/bias/pad flags) and of
// write-backs (lane, address) with a list built here from the definition of a
// 3x3 stride-2 "same" convolution in HWC order with output-channel tiling. Also
// checks the layer's cycle count: out_h*out_w*groups*(9*in_c + 2 + N_PE).
module tb_conv_addr_gen;
  import e2hrl_pkg::*;
  localparam int N = 2;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  layer_cfg_t cfg;
  ag_rd_t rd;
  ag_wb_t wb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  conv_addr_gen #(.N_PE(N)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic first, bias, pad; int faddr, waddr; } rd_e;
  typedef struct { int lane, addr; } wb_e;
  rd_e exp_rd [$];
  wb_e exp_wb [$];

  task automatic run_layer(int ih, int iw, int ic, int oc, int sb, int db, int wbase);
    int oh, ow, pt, pl, taps, cyc, exp_cyc, nrd, nwb;
    oh = (ih + 1) / 2; ow = (iw + 1) / 2;
    pt = ((oh - 1) * 2 + 3 - ih) / 2; pl = ((ow - 1) * 2 + 3 - iw) / 2;
    taps = 9 * ic + 1;
    cfg = make_layer(K_CONV, 1'b1, M_FEAT, M_FEAT, ih, iw, ic, oh, ow, oc, pt, pl, sb, db, wbase);
    exp_rd.delete(); exp_wb.delete();
    for (int y = 0; y < oh; y++)
      for (int x = 0; x < ow; x++)
        for (int g = 0; g < oc; g += N) begin
          rd_e e;
          int t;
          e.first = 1; e.bias = 1; e.pad = 0; e.faddr = sb; e.waddr = wbase + (g / N) * taps;
          exp_rd.push_back(e);
          t = 1;
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++)
              for (int c = 0; c < ic; c++) begin
                int yy, xx;
                yy = 2 * y + ky - pt; xx = 2 * x + kx - pl;
                e.first = 0; e.bias = 0;
                e.pad = !(yy >= 0 && yy < ih && xx >= 0 && xx < iw);
                e.faddr = e.pad ? sb : sb + (yy * iw + xx) * ic + c;
                e.waddr = wbase + (g / N) * taps + t;
                exp_rd.push_back(e);
                t++;
              end
          for (int l = 0; l < N; l++)
            if (g + l < oc) begin
              wb_e w;
              w.lane = l; w.addr = db + (y * ow + x) * oc + g + l;
              exp_wb.push_back(w);
            end
        end
    exp_cyc = oh * ow * ((oc + N - 1) / N) * (taps + 1 + N);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0; nrd = 0; nwb = 0;
    forever begin
      #1;
      if (done) break;
      if (rd.valid) begin
        rd_e e;
        e = exp_rd[nrd];
        checks++;
        if (rd.first !== e.first || rd.bias !== e.bias || rd.pad !== e.pad ||
            32'(rd.waddr) != e.waddr || (!e.pad && 32'(rd.faddr) != e.faddr)) begin
          failures++;
          if (failures < 10)
            $display("FAIL tap %0d: f=%0b b=%0b p=%0b fa=%0d wa=%0d expected %0b %0b %0b %0d %0d",
                     nrd, rd.first, rd.bias, rd.pad, rd.faddr, rd.waddr,
                     e.first, e.bias, e.pad, e.faddr, e.waddr);
        end
        nrd++;
      end
      if (wb.valid) begin
        checks++;
        if (32'(wb.lane) != exp_wb[nwb].lane || 32'(wb.addr) != exp_wb[nwb].addr) begin
          failures++;
          if (failures < 10) $display("FAIL wb %0d: lane %0d addr %0d expected %0d %0d", nwb,
                                      wb.lane, wb.addr, exp_wb[nwb].lane, exp_wb[nwb].addr);
        end
        nwb++;
      end
      @(posedge clk);
      cyc++;
    end
    checks += 3;
    if (nrd != exp_rd.size()) begin failures++; $display("FAIL %0d taps, expected %0d", nrd, exp_rd.size()); end
    if (nwb != exp_wb.size()) begin failures++; $display("FAIL %0d writes, expected %0d", nwb, exp_wb.size()); end
    if (cyc != exp_cyc) begin failures++; $display("FAIL %0d cycles, expected %0d", cyc, exp_cyc); end
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_layer(5, 4, 2, 3, 100, 7, 11);   // odd height, partial channel group
    run_layer(6, 7, 1, 4, 0, 50, 0);
    run_layer(3, 3, 3, 2, 20, 0, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
