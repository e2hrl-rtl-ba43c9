// feature_mem: the feature map memory.
//
// Holds the input image and the intermediate feature maps, stored row-major with
// the channel index innermost (address = (y*W + x)*C + c). It is split into two
// regions, A at address 0 (sized for the largest feature map, the first
// convolution's output) and B after it (input image, second convolution output,
// pi_C hidden vector), so a layer reads one region while writing the other. One
// synchronous read port (data one cycle after the address) and one write port.
// DEPTH defaults to the full network: 20*15*32 + 40*30*3 = 13200 words.
module feature_mem
  import e2hrl_pkg::*;
#(
  parameter int DEPTH = 13200
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] raddr,
  output fx_t               rdata,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  fx_t               wdata
);
  localparam int IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr < ADDR_W'(DEPTH)) mem[waddr[IW-1:0]] <= wdata;
    rdata <= (raddr < ADDR_W'(DEPTH)) ? mem[raddr[IW-1:0]] : fx_t'('0);
  end
endmodule
