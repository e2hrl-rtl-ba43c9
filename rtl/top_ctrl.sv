// top_ctrl: the accelerator's top control logic.
//
// Runs the per-frame layer schedule: conv1, conv2, conv3, embedding dense, then
// the subgoal module pi_G (a dense layer in FC-HRL, the LSTM in LSTM-HRL,
// chosen by use_lstm), then the pi_C dense layer and the action layer. For each
// layer it drives 'layer' (which selects that layer's descriptor and address
// generator in the datapath), pulses the start of the convolution, fully
// connected or LSTM address generator, and waits for its done.
//
// The subgoal module runs only once every K frames: an internal K counter
// counts frames since the last subgoal and is compared with k_param; on equality
// (or on the first frame after episode_start / reset) the branch runs and the
// counter restarts at 1, otherwise the layer is skipped and the sub-goal memory
// keeps the previous subgoal. k_param = 0 is treated as 1 (run every frame).
//
// Timing: start is sampled in IDLE; done pulses for one cycle after the action
// layer's write-back. branch_run reports whether the current/last frame ran pi_G.
module top_ctrl
  import e2hrl_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       episode_start,
  input  logic       use_lstm,
  input  logic [7:0] k_param,
  input  logic       conv_done,
  input  logic       fc_done,
  input  logic       lstm_done,
  output logic [2:0] layer,
  output logic       conv_start,
  output logic       fc_start,
  output logic       lstm_start,
  output logic       busy,
  output logic       done,
  output logic       branch_run,
  output logic [7:0] k_count
);
  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_WAIT, S_DONE} state_e;
  state_e state;

  logic       fresh;      // no subgoal computed since episode start
  logic [7:0] k_eff;
  logic       k_hit;
  logic       is_conv, is_lstm;

  always_comb begin
    k_eff   = (k_param == 8'd0) ? 8'd1 : k_param;
    k_hit   = fresh || (k_count == k_eff);     // the "=" comparator
    is_conv = (32'(layer) <= L_CONV3);
    is_lstm = (32'(layer) == L_SUBG) && use_lstm;
  end

  assign conv_start = (state == S_LAUNCH) && is_conv;
  assign fc_start   = (state == S_LAUNCH) && !is_conv && !is_lstm;
  assign lstm_start = (state == S_LAUNCH) && is_lstm;
  assign busy       = (state != S_IDLE);
  assign done       = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      layer      <= '0;
      fresh      <= 1'b1;
      k_count    <= '0;
      branch_run <= 1'b0;
    end else begin
      if (episode_start && state == S_IDLE) fresh <= 1'b1;
      unique case (state)
        S_IDLE: if (start && !episode_start) begin
          layer <= 3'(L_CONV1);
          state <= S_LAUNCH;
          branch_run <= k_hit;
          if (k_hit) begin
            k_count <= 8'd1;
            fresh   <= 1'b0;
          end else begin
            k_count <= k_count + 1'b1;
          end
        end
        S_LAUNCH: state <= S_WAIT;
        S_WAIT: if (conv_done || fc_done || lstm_done) begin
          if (32'(layer) == L_ACTION) state <= S_DONE;
          else begin
            if (32'(layer) == L_EMB && !branch_run) layer <= 3'(L_HIDDEN);
            else layer <= layer + 1'b1;
            state <= S_LAUNCH;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
