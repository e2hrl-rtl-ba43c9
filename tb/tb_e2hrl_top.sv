// tb_e2hrl_top: End-to-end test of e2hrl_top at reduced sizes (8x6x3 image, 8 channels, 8-long vectors, 4 PEs): two episodes, FC-HRL with K = 3 and LSTM-HRL with K = 2, five frames each, every output and the cycle count of each frame checked against the reference model in e2hrl_tb_core.
module tb_e2hrl_top;
  import e2hrl_pkg::*;

  logic clk, rst_n, ld_we, start, episode_start, use_lstm, busy, done, branch_run;
  logic [2:0]  ld_target;
  logic [$clog2(4+1)-1:0] ld_bank;
  logic [ADDR_W-1:0] ld_addr;
  fx_t ld_data;
  logic [7:0] k_param, k_count;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  fx_t logits [3];
  logic [$clog2(3)-1:0] action;

  e2hrl_top #(.N_PE(4), .IMG_H(6), .IMG_W(8), .IMG_C(3), .CONV_K(8), .EMB(8), .SUB(8), .HID_C(8), .N_ACT(3)) u_dut (
    .clk, .rst_n, .ld_we, .ld_target, .ld_bank, .ld_addr, .ld_data,
    .start, .episode_start, .use_lstm, .k_param,
    .busy, .done, .branch_run, .k_count, .logits, .action
  );

  e2hrl_tb_core #(.N_PE(4), .IMG_H(6), .IMG_W(8), .IMG_C(3), .CONV_K(8), .EMB(8), .SUB(8), .HID_C(8), .N_ACT(3), .FRAMES_PER_EPISODE(5)) u_core (
    .clk, .rst_n, .ld_we, .ld_target, .ld_bank, .ld_addr, .ld_data,
    .start, .episode_start, .use_lstm, .k_param,
    .busy, .done, .branch_run, .k_count, .logits, .action,
    .finished(), .n_checks(), .n_failures()
  );
endmodule
