// tb_weight_mem: fills the four banks of a small weight memory with distinct
// random words through the load port, then reads every address and checks that
// all banks return their own word one cycle after the address.
module tb_weight_mem;
  import e2hrl_pkg::*;
  localparam int N = 4, D = 64;
  logic clk = 1'b0, we = 1'b0;
  logic [ADDR_W-1:0] raddr = '0, waddr = '0;
  logic [2:0] wbank = '0;
  fx_t wdata = '0;
  fx_t rdata [N];
  fx_t model [N][D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  weight_mem #(.N_PE(N), .DEPTH(D)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int p = 0; p < N; p++)
      for (int a = 0; a < D; a++) begin
        model[p][a] = fx_t'($urandom);
        we <= 1'b1; wbank <= 3'(p); waddr <= ADDR_W'(a); wdata <= model[p][a];
        @(posedge clk);
      end
    we <= 1'b0;
    for (int a = 0; a < D; a++) begin
      raddr <= ADDR_W'(a);
      @(posedge clk);
      #1;
      for (int p = 0; p < N; p++) begin
        checks++;
        if (rdata[p] !== model[p][a]) begin
          failures++;
          $display("FAIL bank %0d addr %0d: %h expected %h", p, a, rdata[p], model[p][a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
