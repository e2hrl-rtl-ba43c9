// tb_top_ctrl: drives the top control logic with model address generators that
// answer each start with a done after a random delay. For every frame it
// checks the launched layer sequence (three convolutions, the embedding dense
// layer, the subgoal layer only on K-th frames, on the LSTM when use_lstm is
// set and on the dense engine otherwise, then the two pi_C layers), which
// engine each start went to, branch_run, the K counter, the single done pulse,
// and that episode_start forces the next frame to run the subgoal branch.
module tb_top_ctrl;
  import e2hrl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, episode_start = 1'b0, use_lstm = 1'b0;
  logic [7:0] k_param = 8'd1, k_count;
  logic conv_done = 1'b0, fc_done = 1'b0, lstm_done = 1'b0;
  logic [2:0] layer;
  logic conv_start, fc_start, lstm_start, busy, done, branch_run;
  int checks = 0, failures = 0;
  int launched [$];   // layer*4 + engine (0 conv, 1 fc, 2 lstm)

  always #5 clk = ~clk;

  top_ctrl dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model engines: answer each start with a done 1..6 cycles later
  initial begin
    @(posedge clk);
    forever begin
      #1;
      if (conv_start || fc_start || lstm_start) begin
        int eng, d;
        eng = conv_start ? 0 : fc_start ? 1 : 2;
        checks++;
        if ($countones({conv_start, fc_start, lstm_start}) != 1) failures++;
        launched.push_back(32'(layer) * 4 + eng);
        d = $urandom_range(6, 1);
        repeat (d) @(posedge clk);
        if (eng == 0) conv_done <= 1'b1;
        else if (eng == 1) fc_done <= 1'b1;
        else lstm_done <= 1'b1;
        @(posedge clk);
        conv_done <= 1'b0; fc_done <= 1'b0; lstm_done <= 1'b0;
      end else begin
        @(posedge clk);
      end
    end
  end

  task automatic frame(bit lstm, int k, bit exp_run, int exp_k);
    int exp_l [$];
    int ndone;
    use_lstm <= lstm; k_param <= 8'(k);
    launched.delete();
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    ndone = 0;
    repeat (200) begin
      @(posedge clk);
      #1;
      if (done) ndone++;
    end
    exp_l = '{L_CONV1 * 4, L_CONV2 * 4, L_CONV3 * 4, L_EMB * 4 + 1};
    if (exp_run) exp_l.push_back(L_SUBG * 4 + (lstm ? 2 : 1));
    exp_l.push_back(L_HIDDEN * 4 + 1);
    exp_l.push_back(L_ACTION * 4 + 1);
    checks += 4;
    if (launched != exp_l) begin
      failures++;
      $display("FAIL launches %p expected %p", launched, exp_l);
    end
    if (ndone != 1) begin failures++; $display("FAIL %0d done pulses", ndone); end
    if (branch_run !== exp_run) begin failures++; $display("FAIL branch_run %0b", branch_run); end
    if (32'(k_count) != exp_k) begin failures++; $display("FAIL k_count %0d expected %0d", k_count, exp_k); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // K = 3, FC-HRL: branch on frames 0, 3, 6
    for (int f = 0; f < 7; f++) frame(1'b0, 3, (f % 3) == 0, (f % 3) + 1);
    // new episode forces the branch, LSTM-HRL with K = 2
    episode_start <= 1'b1;
    @(posedge clk);
    episode_start <= 1'b0;
    for (int f = 0; f < 5; f++) frame(1'b1, 2, (f % 2) == 0, (f % 2) + 1);
    // K = 1 and K = 0 run the branch every frame
    frame(1'b0, 1, 1'b1, 1);
    frame(1'b1, 0, 1'b1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
