// conv_addr_gen: convolution address generator.
//
// Walks one 3x3, stride-2 convolution layer with output-channel tiling: for each
// output pixel (oy, ox) and each group of N_PE output channels it issues one
// bias tap and then 9*C input taps (ky, kx, then input channel innermost). Each
// tap fetches a single feature value, shared by all PEs, and one weight per PE
// from the same address of every weight bank. Taps that fall outside the input
// (padding) are flagged so the operand is forced to zero. After the last tap it
// waits one cycle for the memory and accumulator, then writes the N_PE results
// back one lane per cycle, at consecutive channel addresses of the output pixel.
//
// Timing: start (one cycle, cfg stable until done) -> first tap the next cycle.
// A layer takes out_h*out_w*ceil(out_c/N_PE)*(9*in_c + 1 + 1 + N_PE) cycles of
// taps, drain and write-back; done pulses one cycle after the last write-back.
// Strides of two replace pooling, and "same" padding is used so that the layer
// sizes are 40x30 -> 20x15 -> 10x8 -> 5x4 (this design's reading of the layer
// table).
module conv_addr_gen
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

  logic [7:0]        oy, ox;
  logic [15:0]       grp;        // first output channel of the group
  logic              bias_ph;
  logic [1:0]        ky, kx;
  logic [15:0]       ic;
  logic [3:0]        lane;
  logic [ADDR_W-1:0] waddr, wgrp;
  logic [15:0]       taps;       // 9*in_c + 1

  logic signed [11:0] iy, ix;
  logic               pad;

  always_comb begin
    iy  = $signed({3'd0, oy, 1'b0}) + $signed({10'd0, ky}) - $signed({10'd0, cfg.pad_t});
    ix  = $signed({3'd0, ox, 1'b0}) + $signed({10'd0, kx}) - $signed({10'd0, cfg.pad_l});
    pad = (iy < 0) || (ix < 0) || (iy >= $signed({4'd0, cfg.in_h})) ||
          (ix >= $signed({4'd0, cfg.in_w}));
  end

  always_comb begin
    rd       = '0;
    rd.valid = (state == S_ISSUE);
    rd.first = bias_ph;
    rd.bias  = bias_ph;
    rd.pad   = !bias_ph && pad;
    rd.waddr = waddr;
    rd.faddr = (bias_ph || pad) ? cfg.src_base :
               cfg.src_base + ADDR_W'((32'(iy) * 32'(cfg.in_w) + 32'(ix)) * 32'(cfg.in_c) + 32'(ic));
    wb       = '0;
    wb.valid = (state == S_WB) && (32'(grp) + 32'(lane) < 32'(cfg.out_c));
    wb.lane  = lane;
    wb.addr  = cfg.dst_base + ADDR_W'((32'(oy) * 32'(cfg.out_w) + 32'(ox)) * 32'(cfg.out_c)
                                      + 32'(grp) + 32'(lane));
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);
  assign taps = 16'(9 * 32'(cfg.in_c) + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      oy <= '0; ox <= '0; grp <= '0; bias_ph <= 1'b0;
      ky <= '0; kx <= '0; ic <= '0; lane <= '0;
      waddr <= '0; wgrp <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_ISSUE;
          oy <= '0; ox <= '0; grp <= '0;
          bias_ph <= 1'b1; ky <= '0; kx <= '0; ic <= '0;
          waddr <= cfg.wbase; wgrp <= cfg.wbase;
        end
        S_ISSUE: begin
          waddr <= waddr + 1'b1;
          if (bias_ph) begin
            bias_ph <= 1'b0;
          end else if (ic != cfg.in_c - 1) begin
            ic <= ic + 1'b1;
          end else begin
            ic <= '0;
            if (kx != 2'd2) kx <= kx + 1'b1;
            else begin
              kx <= '0;
              if (ky != 2'd2) ky <= ky + 1'b1;
              else begin
                ky <= '0;
                state <= S_DRAIN;
              end
            end
          end
        end
        S_DRAIN: begin
          state <= S_WB;
          lane  <= '0;
        end
        S_WB: begin
          if (lane != 4'(N_PE - 1)) lane <= lane + 1'b1;
          else begin
            bias_ph <= 1'b1;
            state   <= S_ISSUE;
            if (32'(grp) + N_PE < 32'(cfg.out_c)) begin
              grp   <= grp + 16'(N_PE);
              wgrp  <= wgrp + ADDR_W'(taps);
              waddr <= wgrp + ADDR_W'(taps);
            end else begin
              grp   <= '0;
              wgrp  <= cfg.wbase;
              waddr <= cfg.wbase;
              if (ox != cfg.out_w - 1) ox <= ox + 1'b1;
              else begin
                ox <= '0;
                if (oy != cfg.out_h - 1) oy <= oy + 1'b1;
                else state <= S_DONE;
              end
            end
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
