// vector_mem: a small vector memory, used for the image embedding memory and
// for the sub-goal memory.
//
// DEPTH words of fixed-point data with one synchronous read port (data one
// cycle after the address) and one write port. The sub-goal memory keeps the
// last subgoal vector between runs of the subgoal branch, so the action layers
// of the K-1 frames in between reuse it. Contents are cleared by clear (one
// cycle), so a fresh episode starts from a zero subgoal.
module vector_mem
  import e2hrl_pkg::*;
#(
  parameter int DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     clear,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output fx_t                      rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  fx_t                      wdata
);
  fx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (clear) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
    rdata <= mem[raddr];
  end
endmodule
