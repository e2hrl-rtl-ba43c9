// e2hrl_top: the E2HRL hierarchical reinforcement learning agent accelerator.
//
// One frame (an image observation already loaded into the feature map memory)
// is turned into one action. Three 3x3, stride-2 convolutions with ReLU
// (IMG_W x IMG_H x IMG_C -> ... -> CONV_K channels) feed a dense layer that
// produces the EMB-long image embedding. Once every K frames the subgoal
// module pi_G turns the embedding into the SUB-long subgoal vector: a dense
// layer with ReLU (FC-HRL, use_lstm = 0) or one step of the LSTM block
// (LSTM-HRL, use_lstm = 1). The action module pi_C is a dense layer with ReLU
// over [embedding, subgoal] (HID_C outputs) followed by the N_ACT-output action
// layer; the action is the index of the largest output.
//
// Convolutions and dense layers share one array of N_PE processing elements,
// each doing one fixed-point MAC per cycle, fed by banked weight memories (one
// bank per PE, output-channel tiling) and the feature map memory. The top
// control logic steps through the layers and keeps the K counter; the LSTM has
// its own block with two MACs and its own memories.
//
// Interface:
//  - Load port (while idle): ld_target selects weight bank ld_bank, the feature
//    map memory (input image at the region-B base, HWC order), or the LSTM
//    kernel / recurrent kernel / bias memory; one word per cycle.
//  - start: run one frame; done pulses when action/logits are valid.
//  - episode_start (while idle): forces the next frame to run pi_G and clears
//    the LSTM state and the sub-goal memory.
//  - k_param: K, frames per subgoal; use_lstm selects the subgoal module.
// Data are Q16.16 fixed point (e2hrl_pkg). Layer order, sizes and memory maps
// come from e2hrl_pkg::build_layers.
module e2hrl_top
  import e2hrl_pkg::*;
#(
  parameter int N_PE   = 8,
  parameter int IMG_H  = 30,
  parameter int IMG_W  = 40,
  parameter int IMG_C  = 3,
  parameter int CONV_K = 32,
  parameter int EMB    = 32,
  parameter int SUB    = 32,
  parameter int HID_C  = 32,
  parameter int N_ACT  = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // load port
  input  logic                      ld_we,
  input  logic [2:0]                ld_target,  // 0 weights, 1 features, 2 kernel, 3 rec. kernel, 4 bias
  input  logic [$clog2(N_PE+1)-1:0] ld_bank,
  input  logic [ADDR_W-1:0]         ld_addr,
  input  fx_t                       ld_data,
  // run control
  input  logic                      start,
  input  logic                      episode_start,
  input  logic                      use_lstm,
  input  logic [7:0]                k_param,
  output logic                      busy,
  output logic                      done,
  output logic                      branch_run,
  output logic [7:0]                k_count,
  output fx_t                       logits [N_ACT],
  output logic [$clog2(N_ACT)-1:0]  action
);
  localparam layer_tab_t LAYERS = build_layers(IMG_H, IMG_W, IMG_C, CONV_K, EMB, SUB,
                                               HID_C, N_ACT, N_PE);
  localparam int WDEPTH = weight_depth(IMG_H, IMG_W, IMG_C, CONV_K, EMB, SUB, HID_C,
                                       N_ACT, N_PE);
  localparam int FDEPTH = feat_a_words(IMG_H, IMG_W, CONV_K) +
                          feat_b_words(IMG_H, IMG_W, IMG_C, CONV_K, HID_C);
  localparam int EW = $clog2(EMB);
  localparam int SW = $clog2(SUB);
  localparam int LW = (N_PE > 1) ? $clog2(N_PE) : 1;

  // ---------------- top control ----------------
  logic [2:0] layer;
  logic conv_start, fc_start, lstm_start;
  logic conv_done, fc_done, lstm_done;
  logic conv_busy, fc_busy, lstm_busy;
  layer_cfg_t cfg;

  always_comb cfg = LAYERS[layer];

  top_ctrl u_ctrl (
    .clk, .rst_n, .start, .episode_start, .use_lstm, .k_param,
    .conv_done, .fc_done, .lstm_done,
    .layer, .conv_start, .fc_start, .lstm_start,
    .busy, .done, .branch_run, .k_count
  );

  // ---------------- address generators ----------------
  ag_rd_t conv_rd, fc_rd, rd;
  ag_wb_t conv_wb, fc_wb, wb;
  lstm_ag_t lag;

  conv_addr_gen #(.N_PE(N_PE)) u_conv_ag (
    .clk, .rst_n, .start(conv_start), .cfg, .busy(conv_busy), .done(conv_done),
    .rd(conv_rd), .wb(conv_wb)
  );

  fc_addr_gen #(.N_PE(N_PE)) u_fc_ag (
    .clk, .rst_n, .start(fc_start), .cfg, .busy(fc_busy), .done(fc_done),
    .rd(fc_rd), .wb(fc_wb)
  );

  lstm_addr_gen #(.IN(EMB), .HID(SUB)) u_lstm_ag (
    .clk, .rst_n, .start(lstm_start), .busy(lstm_busy), .ag(lag)
  );
  assign lstm_done = lag.done;

  // Address multiplexers: the active generator drives the memories.
  always_comb begin
    rd = conv_busy ? conv_rd : fc_rd;
    wb = conv_busy ? conv_wb : fc_wb;
  end

  // ---------------- memories ----------------
  fx_t wdata [N_PE];
  fx_t feat_rdata, emb_rdata, subg_rdata;
  logic feat_we, emb_we, subg_we, logit_we;
  logic [ADDR_W-1:0] feat_waddr;
  fx_t feat_wdata, wb_data;
  logic [EW-1:0] emb_raddr;
  logic [SW-1:0] subg_raddr, subg_waddr;
  fx_t subg_wdata;
  logic [7:0] lstm_x_addr, lstm_h_addr;
  logic lstm_h_we;
  fx_t lstm_h_data;
  fx_t pe_y [N_PE];

  weight_mem #(.N_PE(N_PE), .DEPTH(WDEPTH)) u_wmem (
    .clk, .raddr(rd.waddr), .rdata(wdata),
    .we(ld_we && ld_target == 3'd0), .wbank(ld_bank), .waddr(ld_addr), .wdata(ld_data)
  );

  always_comb begin
    wb_data    = (32'(wb.lane) < N_PE) ? pe_y[LW'(wb.lane)] : pe_y[0];
    feat_we    = (wb.valid && cfg.dst == M_FEAT) || (ld_we && ld_target == 3'd1);
    feat_waddr = (wb.valid && cfg.dst == M_FEAT) ? wb.addr : ld_addr;
    feat_wdata = (wb.valid && cfg.dst == M_FEAT) ? wb_data : ld_data;
    emb_we     = wb.valid && cfg.dst == M_EMB;
    logit_we   = wb.valid && cfg.dst == M_LOGIT;
    subg_we    = (wb.valid && cfg.dst == M_SUBG) || lstm_h_we;
    subg_waddr = lstm_h_we ? SW'(lstm_h_addr) : SW'(wb.addr);
    subg_wdata = lstm_h_we ? lstm_h_data : wb_data;
    // the image embedding feeds the LSTM (x_t) or a dense layer
    emb_raddr  = lstm_busy ? EW'(lstm_x_addr) : EW'(rd.faddr);
    subg_raddr = (cfg.src == M_CONCAT) ? SW'(rd.faddr - ADDR_W'(EMB)) : SW'(rd.faddr);
  end

  feature_mem #(.DEPTH(FDEPTH)) u_fmem (
    .clk, .raddr(rd.faddr), .rdata(feat_rdata),
    .we(feat_we), .waddr(feat_waddr), .wdata(feat_wdata)
  );

  vector_mem #(.DEPTH(EMB)) u_emb_mem (
    .clk, .clear(1'b0), .raddr(emb_raddr), .rdata(emb_rdata),
    .we(emb_we), .waddr(EW'(wb.addr)), .wdata(wb_data)
  );

  vector_mem #(.DEPTH(SUB)) u_subg_mem (
    .clk, .clear(episode_start && !busy), .raddr(subg_raddr), .rdata(subg_rdata),
    .we(subg_we), .waddr(subg_waddr), .wdata(subg_wdata)
  );

  // ---------------- operand selection and PE array ----------------
  ag_rd_t   rd_d;
  mem_sel_e src_d;
  fx_t      a_op;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_d  <= '0;
      src_d <= M_FEAT;
    end else begin
      rd_d  <= rd;
      // concatenated input: first EMB elements from the embedding, then the subgoal
      src_d <= (cfg.src == M_CONCAT) ? ((rd.faddr < ADDR_W'(EMB)) ? M_EMB : M_SUBG) : cfg.src;
    end
  end

  always_comb begin
    unique case (src_d)
      M_EMB:   a_op = emb_rdata;
      M_SUBG:  a_op = subg_rdata;
      default: a_op = feat_rdata;
    endcase
    if (rd_d.bias)     a_op = FX_ONE;
    else if (rd_d.pad) a_op = '0;
  end

  pe_array #(.N_PE(N_PE)) u_pes (
    .clk, .rst_n, .en(rd_d.valid), .s_load(rd_d.first), .relu_en(cfg.relu),
    .a(a_op), .w(wdata), .y(pe_y)
  );

  // ---------------- LSTM block ----------------
  lstm_block #(.IN(EMB), .HID(SUB)) u_lstm (
    .clk, .rst_n, .state_clear(episode_start && !busy), .ag(lag),
    .x_addr(lstm_x_addr), .x_data(emb_rdata),
    .h_we(lstm_h_we), .h_addr(lstm_h_addr), .h_data(lstm_h_data),
    .ld_we(ld_we && ld_target >= 3'd2), .ld_sel(2'(ld_target - 3'd2)),
    .ld_addr, .ld_data
  );

  // ---------------- action output ----------------
  action_select #(.N_ACT(N_ACT)) u_act (
    .clk, .rst_n, .we(logit_we), .waddr(($clog2(N_ACT))'(wb.addr)), .wdata(wb_data),
    .logits, .action
  );
endmodule
