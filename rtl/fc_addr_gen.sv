// fc_addr_gen: fully connected (dense) layer address generator.
//
// Same tiling as the convolution: PE p of group g computes output neuron
// g*N_PE + p. For each group it issues one bias tap and then one tap per input
// element i (feature address src_base + i, or input index i when the input is
// the embedding, sub-goal or concatenated vector), with the weight address
// running through that group's stream in the weight banks. After one drain cycle
// it writes the N_PE results back one per cycle to dst_base + neuron index,
// skipping lanes beyond out_c.
//
// Timing: start (cfg stable until done) -> first tap next cycle; the layer takes
// ceil(out_c/N_PE)*(in_c + 1 + 1 + N_PE) cycles, and done pulses one cycle after
// the last write-back.
module fc_addr_gen
  import e2hrl_pkg::*;
#(
  parameter int N_PE = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  layer_cfg_t cfg,
  output logic       busy,
  output logic       done,
  output ag_rd_t     rd,
  output ag_wb_t     wb
);
  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_DRAIN, S_WB, S_DONE} state_e;
  state_e state;

  logic [15:0]       grp;
  logic              bias_ph;
  logic [15:0]       idx;
  logic [3:0]        lane;
  logic [ADDR_W-1:0] waddr;

  always_comb begin
    rd       = '0;
    rd.valid = (state == S_ISSUE);
    rd.first = bias_ph;
    rd.bias  = bias_ph;
    rd.pad   = 1'b0;
    rd.waddr = waddr;
    rd.faddr = cfg.src_base + ADDR_W'(idx);
    wb       = '0;
    wb.valid = (state == S_WB) && (32'(grp) + 32'(lane) < 32'(cfg.out_c));
    wb.lane  = lane;
    wb.addr  = cfg.dst_base + ADDR_W'(grp) + ADDR_W'(lane);
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      grp <= '0; bias_ph <= 1'b0; idx <= '0; lane <= '0; waddr <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_ISSUE;
          grp <= '0; bias_ph <= 1'b1; idx <= '0;
          waddr <= cfg.wbase;
        end
        S_ISSUE: begin
          waddr <= waddr + 1'b1;
          if (bias_ph) bias_ph <= 1'b0;
          else if (idx != cfg.in_c - 1) idx <= idx + 1'b1;
          else begin
            idx   <= '0;
            state <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          state <= S_WB;
          lane  <= '0;
        end
        S_WB: begin
          if (lane != 4'(N_PE - 1)) lane <= lane + 1'b1;
          else if (32'(grp) + N_PE < 32'(cfg.out_c)) begin
            grp     <= grp + 16'(N_PE);
            bias_ph <= 1'b1;
            state   <= S_ISSUE;
          end else begin
            state <= S_DONE;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
