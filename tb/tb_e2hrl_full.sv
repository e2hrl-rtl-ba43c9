// tb_e2hrl_full: Full-size test of e2hrl_top with every parameter at its default (40x30x3 image, 32 filters, 32-long vectors, 8 PEs): an FC-HRL episode (K = 3) and an LSTM-HRL episode (K = 2) of three frames each, checked against the reference model in e2hrl_tb_core.
module tb_e2hrl_full;
  import e2hrl_pkg::*;

  logic clk, rst_n, ld_we, start, episode_start, use_lstm, busy, done, branch_run;
  logic [2:0]  ld_target;
  logic [$clog2(8+1)-1:0] ld_bank;
  logic [ADDR_W-1:0] ld_addr;
  fx_t ld_data;
  logic [7:0] k_param, k_count;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  fx_t logits [3];
  logic [$clog2(3)-1:0] action;

  e2hrl_top u_dut (
    .clk, .rst_n, .ld_we, .ld_target, .ld_bank, .ld_addr, .ld_data,
    .start, .episode_start, .use_lstm, .k_param,
    .busy, .done, .branch_run, .k_count, .logits, .action
  );

  e2hrl_tb_core #(.FRAMES_PER_EPISODE(3)) u_core (
    .clk, .rst_n, .ld_we, .ld_target, .ld_bank, .ld_addr, .ld_data,
    .start, .episode_start, .use_lstm, .k_param,
    .busy, .done, .branch_run, .k_count, .logits, .action,
    .finished(), .n_checks(), .n_failures()
  );
endmodule
