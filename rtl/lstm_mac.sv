// lstm_mac: pipelined multiply-accumulate unit (MAC1 and MAC2 of the LSTM block).
//
// Two register stages, as drawn for the LSTM MACs: the fixed-point product of a
// and b is registered, then added to the accumulator register. s_load travels
// with its operands and, on the accumulate stage, replaces the accumulator
// feedback with zero so a new dot product starts. An operand pair presented
// with en high in cycle c is included in acc from cycle c+2 on.
module lstm_mac
  import e2hrl_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic s_load,
  input  fx_t  a,
  input  fx_t  b,
  output fx_t  acc
);
  fx_t  prod_r;
  logic v_r, sl_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_r <= '0;
      v_r    <= 1'b0;
      sl_r   <= 1'b0;
      acc    <= '0;
    end else begin
      prod_r <= fxmul(a, b);
      v_r    <= en;
      sl_r   <= s_load;
      if (v_r) acc <= (sl_r ? fx_t'('0) : acc) + prod_r;
    end
  end
endmodule
