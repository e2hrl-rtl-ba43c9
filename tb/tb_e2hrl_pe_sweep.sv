// tb_e2hrl_pe_sweep: the full-size network (40x30x3 image, 32 filters,
// 32-long vectors) on accelerators with 1 and 2 processing elements, the
// smaller PE counts of the evaluated range 1..8 (4 and 8 PEs are covered by
// the other end-to-end testbenches).
//
// Two instances of e2hrl_top, one with N_PE = 1 and one with N_PE = 2, run side
// by side on one clock, each driven and checked by its own e2hrl_tb_core: an
// FC-HRL episode (K = 3) and an LSTM-HRL episode (K = 2) of two frames each,
// with every frame's outputs, action, subgoal decision and cycle count
// compared with the reference model. The cycle count checks the frame latency
// formulas at these PE counts; at N_PE = 1 a frame with the FC subgoal module
// takes about 1.24 M cycles (12.4 ms at 100 MHz). When both cores have finished
// this testbench adds up their checks and failures and prints the result. A
// watchdog ends the run after 40 M cycles.
module tb_e2hrl_pe_sweep;
  import e2hrl_pkg::*;

  localparam int NV = 2;
  localparam int PES [NV] = '{1, 2};

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic fin   [NV];
  int   nchk  [NV];
  int   nfail [NV];

  for (genvar v = 0; v < NV; v++) begin : g_pe
    localparam int N = PES[v];
    logic rst_n, ld_we, start, episode_start, use_lstm, busy, done, branch_run;
    logic [2:0]  ld_target;
    logic [$clog2(N+1)-1:0] ld_bank;
    logic [ADDR_W-1:0] ld_addr;
    fx_t ld_data;
    logic [7:0] k_param, k_count;
    fx_t logits [3];
    logic [$clog2(3)-1:0] action;

    e2hrl_top #(.N_PE(N)) u_dut (
      .clk, .rst_n, .ld_we, .ld_target, .ld_bank, .ld_addr, .ld_data,
      .start, .episode_start, .use_lstm, .k_param,
      .busy, .done, .branch_run, .k_count, .logits, .action
    );

    e2hrl_tb_core #(.N_PE(N), .FRAMES_PER_EPISODE(2), .STANDALONE(1'b0)) u_core (
      .clk, .rst_n, .ld_we, .ld_target, .ld_bank, .ld_addr, .ld_data,
      .start, .episode_start, .use_lstm, .k_param,
      .busy, .done, .branch_run, .k_count, .logits, .action,
      .finished(fin[v]), .n_checks(nchk[v]), .n_failures(nfail[v])
    );
  end

  initial begin
    int checks, failures;
    fork
      begin
        wait (fin[0] && fin[1]);
        checks = 0; failures = 0;
        for (int v = 0; v < NV; v++) begin
          $display("N_PE=%0d: checks=%0d failures=%0d", PES[v], nchk[v], nfail[v]);
          checks += nchk[v];
          failures += nfail[v];
        end
      end
      begin
        repeat (40_000_000) @(posedge clk);
        $display("watchdog expired");
        checks = nchk[0] + nchk[1] + 1;
        failures = nfail[0] + nfail[1] + 1;
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
