// lstm_block: the LSTM layer of the LSTM-HRL subgoal module.
//
// Computes one LSTM time step, h_t and c_t from x_t (the image embedding) and
// the state kept from the previous run:
//   i,f,o = hardsigmoid(W_x x_t + W_h h_(t-1) + b),  g = hardtanh(...)
//   c_t = f*c_(t-1) + i*g,   h_t = hardtanh(c_t) * o
// It holds the kernel memory (the four input matrices stacked), the recurrent
// kernel memory (the four recurrent matrices stacked), the bias memory and the
// cell state memory, two pipelined MACs (MAC1: kernel times x_t, MAC2: recurrent
// kernel times h_(t-1)), an accumulator joining both sums with the bias, the hard
// tanh / hard sigmoid unit, the four gate registers and the element-wise
// c_t / h_t datapath. The sequencing comes from lstm_addr_gen (ag); this
// block's own control logic aligns it with the one-cycle memory reads.
// The two MAC sums and the bias are joined by a third accumulator: on the three
// sum_stb cycles the select S1 feeds it MAC1 (with S_load, replacing the old
// value), then MAC2, then the bias; act_stb then activates its value.
//
// h_(t-1) is kept in a two-bank register file so h_t can be written while the
// old vector is still being read; the banks swap when a run finishes. Each h_t
// element is also sent out (h_we/h_addr/h_data) to the sub-goal memory.
// x_t is read from outside: x_addr is ag.tidx, x_data must follow one cycle
// later. state_clear zeroes c and h (start of an episode; this design's
// choice). Weights are written through the load port: ld_sel 0 kernel,
// 1 recurrent kernel, 2 bias.
module lstm_block
  import e2hrl_pkg::*;
#(
  parameter int IN  = 32,
  parameter int HID = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              state_clear,
  input  lstm_ag_t          ag,
  output logic [7:0]        x_addr,
  input  fx_t               x_data,
  output logic              h_we,
  output logic [7:0]        h_addr,
  output fx_t               h_data,
  input  logic              ld_we,
  input  logic [1:0]        ld_sel,
  input  logic [ADDR_W-1:0] ld_addr,
  input  fx_t               ld_data
);
  localparam int KDEPTH = 4 * HID * IN;
  localparam int RDEPTH = 4 * HID * HID;
  localparam int BDEPTH = 4 * HID;

  localparam int KW = $clog2(KDEPTH);
  localparam int RW = $clog2(RDEPTH);
  localparam int BW = $clog2(BDEPTH);

  fx_t kernel_mem [KDEPTH];
  fx_t rec_mem    [RDEPTH];
  fx_t bias_mem   [BDEPTH];
  fx_t cell_mem   [HID];
  fx_t h_mem      [2][HID];
  logic cur;

  fx_t k_rd, r_rd, b_rd, h_rd;
  logic v_d, first_d, xv_d, hv_d;

  // Weight memories: load port and synchronous reads.
  always_ff @(posedge clk) begin
    if (ld_we && ld_sel == 2'd0 && ld_addr < ADDR_W'(KDEPTH)) kernel_mem[ld_addr[KW-1:0]] <= ld_data;
    if (ld_we && ld_sel == 2'd1 && ld_addr < ADDR_W'(RDEPTH)) rec_mem[ld_addr[RW-1:0]]    <= ld_data;
    if (ld_we && ld_sel == 2'd2 && ld_addr < ADDR_W'(BDEPTH)) bias_mem[ld_addr[BW-1:0]]   <= ld_data;
    k_rd <= (ag.kaddr < ADDR_W'(KDEPTH)) ? kernel_mem[ag.kaddr[KW-1:0]] : fx_t'('0);
    r_rd <= (ag.raddr < ADDR_W'(RDEPTH)) ? rec_mem[ag.raddr[RW-1:0]]    : fx_t'('0);
    b_rd <= (ag.baddr < ADDR_W'(BDEPTH)) ? bias_mem[ag.baddr[BW-1:0]]   : fx_t'('0);
  end

  assign x_addr = ag.tidx;

  // Control alignment with the one-cycle memory latency.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d <= 1'b0; first_d <= 1'b0; xv_d <= 1'b0; hv_d <= 1'b0;
    end else begin
      v_d <= ag.valid; first_d <= ag.first; xv_d <= ag.xv; hv_d <= ag.hv;
    end
  end

  // MAC1: kernel x x_t.  MAC2: recurrent kernel x h_(t-1).
  fx_t acc1, acc2;
  lstm_mac u_mac1 (.clk, .rst_n, .en(v_d), .s_load(first_d),
                   .a(xv_d ? k_rd : fx_t'('0)), .b(x_data), .acc(acc1));
  lstm_mac u_mac2 (.clk, .rst_n, .en(v_d), .s_load(first_d),
                   .a(hv_d ? r_rd : fx_t'('0)), .b(h_rd), .acc(acc2));

  // Gate pre-activation, activation and gate registers.
  // Third accumulator: S1 selects the term, S_load (first term) drops the
  // feedback.
  fx_t pre, s1_term, act;
  fx_t gate_r [4];
  always_comb begin
    unique case (ag.sum_sel)
      2'(S1_MAC1): s1_term = acc1;
      2'(S1_MAC2): s1_term = acc2;
      default:     s1_term = b_rd;
    endcase
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          pre <= '0;
    else if (ag.sum_stb) pre <= ((ag.sum_sel == 2'(S1_MAC1)) ? fx_t'('0) : pre) + s1_term;
  end
  hard_act u_act (.s_tanh(ag.gate == 2'(G_G)), .x(pre), .y(act));

  // Cell and output update.
  fx_t c_old, c_new, h_new;
  always_comb begin
    c_old = cell_mem[ag.unit[$clog2(HID)-1:0]];
    c_new = fxmul(gate_r[G_F], c_old) + fxmul(gate_r[G_I], gate_r[G_G]);
    h_new = fxmul(hard_tanh(c_new), gate_r[G_O]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur  <= 1'b0;
      h_rd <= '0;
      for (int q = 0; q < 4; q++) gate_r[q] <= '0;
      for (int j = 0; j < HID; j++) begin
        cell_mem[j] <= '0;
        h_mem[0][j] <= '0;
        h_mem[1][j] <= '0;
      end
    end else if (state_clear) begin
      cur <= 1'b0;
      for (int j = 0; j < HID; j++) begin
        cell_mem[j] <= '0;
        h_mem[0][j] <= '0;
        h_mem[1][j] <= '0;
      end
    end else begin
      h_rd <= (32'(ag.tidx) < HID) ? h_mem[cur][ag.tidx[$clog2(HID)-1:0]] : fx_t'('0);
      if (ag.act_stb) gate_r[ag.gate] <= act;
      if (ag.cell_stb) begin
        cell_mem[ag.unit[$clog2(HID)-1:0]]  <= c_new;
        h_mem[!cur][ag.unit[$clog2(HID)-1:0]] <= h_new;
      end
      if (ag.done) cur <= !cur;
    end
  end

  assign h_we   = ag.cell_stb;
  assign h_addr = ag.unit;
  assign h_data = h_new;
endmodule
