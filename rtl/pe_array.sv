// pe_array: N_PE processing elements working on one shared feature value.
//
// Output-channel tiling: every cycle the same input value a (one input channel
// value of the current tap) is multiplied in every PE by that PE's own weight
// w[p], so PE p accumulates output channel (group*N_PE + p). en, s_load and
// relu_en are common to all lanes. y[p] is lane p's result after the optional
// ReLU, valid the cycle after the last enabled MAC. N_PE = 8 is the accelerator's
// most energy-efficient configuration; 1, 2 and 4 are the other evaluated ones.
module pe_array
  import e2hrl_pkg::*;
#(
  parameter int N_PE = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic s_load,
  input  logic relu_en,
  input  fx_t  a,
  input  fx_t  w [N_PE],
  output fx_t  y [N_PE]
);
  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    fx_t acc_unused;
    pe u_pe (
      .clk, .rst_n, .en, .s_load, .relu_en,
      .a, .w(w[p]), .acc(acc_unused), .y(y[p])
    );
  end
endmodule
