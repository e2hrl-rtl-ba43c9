// tb_vector_mem: writes and reads a 32-word vector memory (image embedding /
// sub-goal memory), then checks that clear zeroes every word.
module tb_vector_mem;
  import e2hrl_pkg::*;
  localparam int D = 32;
  logic clk = 1'b0, we = 1'b0, clear = 1'b0;
  logic [4:0] raddr = '0, waddr = '0;
  fx_t wdata = '0, rdata;
  fx_t model [D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vector_mem #(.DEPTH(D)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int a = 0; a < D; a++) begin
      raddr <= 5'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d: %h expected %h", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    @(posedge clk);
    for (int a = 0; a < D; a++) begin
      model[a] = fx_t'($urandom) | 1;
      we <= 1'b1; waddr <= 5'(a); wdata <= model[a];
      @(posedge clk);
    end
    we <= 1'b0;
    read_all();
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    foreach (model[a]) model[a] = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
