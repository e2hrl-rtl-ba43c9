// tb_feature_mem: random interleaved writes and reads on a small feature map
// memory, checked against a model with one cycle of read latency.
module tb_feature_mem;
  import e2hrl_pkg::*;
  localparam int D = 256;
  logic clk = 1'b0, we = 1'b0;
  logic [ADDR_W-1:0] raddr = '0, waddr = '0;
  fx_t wdata = '0, rdata;
  fx_t model [D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  feature_mem #(.DEPTH(D)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int a = 0; a < D; a++) begin
      model[a] = fx_t'($urandom);
      we <= 1'b1; waddr <= ADDR_W'(a); wdata <= model[a];
      @(posedge clk);
    end
    we <= 1'b0;
    repeat (2000) begin
      int ra, wa;
      fx_t wv;
      ra = $urandom_range(D - 1, 0);
      wa = $urandom_range(D - 1, 0);
      wv = fx_t'($urandom);
      raddr <= ADDR_W'(ra);
      we <= 1'b1; waddr <= ADDR_W'(wa); wdata <= wv;
      @(posedge clk);
      #1;
      checks++;
      // read-before-write on the same address returns the old word
      if (rdata !== model[ra]) begin
        failures++;
        $display("FAIL addr %0d: %h expected %h", ra, rdata, model[ra]);
      end
      model[wa] = wv;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
