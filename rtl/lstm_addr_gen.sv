// lstm_addr_gen: LSTM address generator.
//
// With the four kernel matrices stacked into one kernel memory
// ([W_xi; W_xf; W_xo; W_xg], HID rows each, IN words per row) and the four
// recurrent matrices stacked into the recurrent kernel memory (HID words per
// row), every gate pre-activation is one row of each memory times x_t or
// h_(t-1). For each hidden unit j and gate q (order i, f, o, g) this block
// issues max(IN, HID) taps: kernel address (q*HID+j)*IN + t, recurrent address
// (q*HID+j)*HID + t and bias address q*HID + j, flagging which of the two MACs
// has an operand. Two drain cycles later the MAC sums are ready; it then raises
// sum_stb for three cycles with the select S1 = MAC1, MAC2, bias, so the
// block's third accumulator adds the three terms one at a time, then act_stb
// (activate the completed pre-activation), and after the fourth gate cell_stb
// (update c_t and h_t of unit j).
//
// Timing: start -> first tap next cycle; a run takes
// HID*(4*(max(IN,HID) + 6) + 1) cycles, then done is high for one cycle.
// The taps of one gate are not overlapped with the sum of the previous one
// (this design's choice; the cycle budget of the block is not given).
module lstm_addr_gen
  import e2hrl_pkg::*;
#(
  parameter int IN  = 32,
  parameter int HID = 32
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  output logic     busy,
  output lstm_ag_t ag
);
  localparam int TL = (IN > HID) ? IN : HID;

  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_DRAIN, S_SUM, S_ACT, S_CELL, S_DONE} state_e;
  state_e state;

  logic [7:0] unit, tidx;
  logic [1:0] gate;
  logic       first;
  logic       drain;
  logic [1:0] sumc;
  logic [ADDR_W-1:0] row;

  always_comb begin
    row        = ADDR_W'(32'(gate) * HID + 32'(unit));
    ag         = '0;
    ag.valid   = (state == S_ISSUE);
    ag.first   = (state == S_ISSUE) && first;
    ag.xv      = (state == S_ISSUE) && (32'(tidx) < IN);
    ag.hv      = (state == S_ISSUE) && (32'(tidx) < HID);
    ag.kaddr   = ADDR_W'(32'(row) * IN + 32'(tidx));
    ag.raddr   = ADDR_W'(32'(row) * HID + 32'(tidx));
    ag.baddr   = row;
    ag.tidx    = tidx;
    ag.sum_stb = (state == S_SUM);
    ag.sum_sel = (state == S_SUM) ? sumc : 2'd0;
    ag.act_stb = (state == S_ACT);
    ag.gate    = gate;
    ag.cell_stb = (state == S_CELL);
    ag.unit    = unit;
    ag.done    = (state == S_DONE);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      unit <= '0; tidx <= '0; gate <= '0; first <= 1'b0; drain <= 1'b0;
      sumc <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_ISSUE;
          unit <= '0; tidx <= '0; gate <= '0; first <= 1'b1;
        end
        S_ISSUE: begin
          first <= 1'b0;
          if (32'(tidx) != TL - 1) tidx <= tidx + 1'b1;
          else begin
            tidx  <= '0;
            drain <= 1'b0;
            state <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          drain <= 1'b1;
          sumc  <= 2'(S1_MAC1);
          if (drain) state <= S_SUM;
        end
        S_SUM: begin
          sumc <= sumc + 1'b1;
          if (sumc == 2'(S1_BIAS)) state <= S_ACT;
        end
        S_ACT: begin
          if (gate != 2'(G_G)) begin
            gate  <= gate + 1'b1;
            first <= 1'b1;
            state <= S_ISSUE;
          end else begin
            state <= S_CELL;
          end
        end
        S_CELL: begin
          gate <= '0;
          if (32'(unit) != HID - 1) begin
            unit  <= unit + 1'b1;
            first <= 1'b1;
            state <= S_ISSUE;
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
