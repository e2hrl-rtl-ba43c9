// pe: one processing element of the PE array.
//
// A multiplier, an adder and an accumulator register followed by a ReLU, as in
// the accelerator's block diagram; one multiply-accumulate per clock. When en is
// high the register takes acc + a*w, or just a*w when s_load is high (the adder's
// feedback input is replaced by zero, starting a new dot product). The product is
// the Q16.16 fixed-point product from e2hrl_pkg. y is the accumulator after the
// optional ReLU (relu_en), combinationally; y is valid the cycle after the last
// enabled MAC. Bias is handled by the address generators as an extra tap whose
// feature operand is 1.0 (this design's choice).
module pe
  import e2hrl_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic s_load,
  input  logic relu_en,
  input  fx_t  a,
  input  fx_t  w,
  output fx_t  acc,
  output fx_t  y
);
  fx_t prod;

  always_comb prod = fxmul(a, w);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= (s_load ? fx_t'('0) : acc) + prod;
  end

  always_comb y = (relu_en && acc < 0) ? fx_t'('0) : acc;
endmodule
