// tb_action_select: writes random action-layer outputs (with forced ties and
// negative values) and checks the stored outputs and the chosen action (the
// largest output, lower index on ties) against a model.
module tb_action_select;
  import e2hrl_pkg::*;
  localparam int NA = 3;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [1:0] waddr = '0;
  fx_t wdata = '0;
  fx_t logits [NA];
  logic [1:0] action;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  action_select #(.N_ACT(NA)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int trial = 0; trial < 300; trial++) begin
      fx_t v [NA];
      int best;
      for (int i = 0; i < NA; i++) v[i] = fx_t'($urandom_range(2000, 0)) - 1000;
      if (trial % 5 == 0) v[2] = v[1];
      if (trial % 7 == 0) v[0] = v[2];
      best = 0;
      for (int i = 1; i < NA; i++) if (v[i] > v[best]) best = i;
      for (int i = 0; i < NA; i++) begin
        we <= 1'b1; waddr <= 2'(i); wdata <= v[i];
        @(posedge clk);
      end
      we <= 1'b0;
      @(posedge clk);
      #1;
      checks++;
      if (32'(action) != best) begin
        failures++;
        $display("FAIL action %0d expected %0d", action, best);
      end
      for (int i = 0; i < NA; i++) begin
        checks++;
        if (logits[i] !== v[i]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
