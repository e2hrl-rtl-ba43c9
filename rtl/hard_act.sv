// hard_act: the LSTM block's activation unit.
//
// Computes either the hard tanh (s_tanh = 1) or the hard sigmoid (s_tanh = 0)
// of x, combinationally. hardtanh clips x to [-1, 1]; hardsigmoid is 0 below
// -2.5, 1 above 2.5 and 0.2*x + 0.5 in between. Both are the piecewise-linear
// replacements for tanh and sigmoid that keep the LSTM free of exponentials.
// Q16.16 fixed point; 0.2 is represented as 13107/65536.
module hard_act
  import e2hrl_pkg::*;
(
  input  logic s_tanh,
  input  fx_t  x,
  output fx_t  y
);
  always_comb y = s_tanh ? hard_tanh(x) : hard_sigmoid(x);
endmodule
