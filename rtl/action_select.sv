// action_select: action output stage.
//
// The action layer ends in a softmax over N_ACT outputs. Softmax preserves
// order, so the most probable action is the index of the largest action-layer
// output; this stage keeps the N_ACT outputs in registers as they are written
// back and reports that index. It does not compute the probabilities
// themselves (this design's choice: the accelerator only has to pick the
// action). Ties go to the lower index.
//
// Interface: we/waddr/wdata write one output per cycle; action and logits are
// combinational from the registers, valid once all N_ACT have been written.
module action_select
  import e2hrl_pkg::*;
#(
  parameter int N_ACT = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(N_ACT)-1:0] waddr,
  input  fx_t                      wdata,
  output fx_t                      logits [N_ACT],
  output logic [$clog2(N_ACT)-1:0] action
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ACT; i++) logits[i] <= '0;
    end else if (we) begin
      logits[waddr] <= wdata;
    end
  end

  always_comb begin
    fx_t best;
    best   = logits[0];
    action = '0;
    for (int i = 1; i < N_ACT; i++) begin
      if (logits[i] > best) begin
        best   = logits[i];
        action = ($clog2(N_ACT))'(i);
      end
    end
  end
endmodule
