// weight_mem: the banked weight memories, one bank per processing element.
//
// Every bank holds, for each layer, the weights of the output channels/neurons
// its PE computes (output-channel tiling), so one shared read address fetches
// N_PE weights per cycle: rdata[p] is bank p's word at raddr, one cycle after
// raddr is presented (synchronous read, block-RAM style). Doubling N_PE halves
// each bank's depth. Writes come from the load port (bank select, address,
// data) and take effect at the clock edge. DEPTH defaults to the bank depth of
// the full network at N_PE = 8; the layout of a bank is defined by
// e2hrl_pkg::build_layers (per layer: groups of [bias, taps...]).
module weight_mem
  import e2hrl_pkg::*;
#(
  parameter int N_PE  = 8,
  parameter int DEPTH = 5413
) (
  input  logic                     clk,
  input  logic [ADDR_W-1:0]        raddr,
  output fx_t                      rdata [N_PE],
  input  logic                     we,
  input  logic [$clog2(N_PE+1)-1:0] wbank,
  input  logic [ADDR_W-1:0]        waddr,
  input  fx_t                      wdata
);
  localparam int IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  for (genvar p = 0; p < N_PE; p++) begin : g_bank
    fx_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we && 32'(wbank) == p && waddr < ADDR_W'(DEPTH)) mem[waddr[IW-1:0]] <= wdata;
      rdata[p] <= (raddr < ADDR_W'(DEPTH)) ? mem[raddr[IW-1:0]] : fx_t'('0);
    end
  end
endmodule
