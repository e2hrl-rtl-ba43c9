// e2hrl_pkg: types, constants and arithmetic shared by the E2HRL accelerator.
//
// Data are 32-bit signed fixed point (the accelerator's stated word size). The
// split between integer and fraction bits is this design's choice: Q16.16
// (FRAC = 16). A fixed-point product is the full 64-bit product shifted right
// arithmetically by FRAC and truncated to 32 bits; sums wrap.
//
// The network is described to the controller as a table of layer descriptors
// (layer_cfg_t). build_layers() derives that table from the network sizes, so the
// same RTL serves the full 40x30x3 network and reduced test networks. Memory
// layouts (feature-map regions, weight-bank streams) are defined here so the
// loader and the testbenches agree with the address generators.
package e2hrl_pkg;

  localparam int DATA_W = 32;
  localparam int FRAC   = 16;
  localparam int ADDR_W = 20;

  typedef logic signed [DATA_W-1:0] fx_t;

  localparam fx_t FX_ONE = fx_t'(1 <<< FRAC);

  // Layer slots in the per-frame schedule.
  localparam int NUM_LAYERS = 7;
  localparam int L_CONV1  = 0;
  localparam int L_CONV2  = 1;
  localparam int L_CONV3  = 2;
  localparam int L_EMB    = 3;  // flatten -> dense image embedding
  localparam int L_SUBG   = 4;  // subgoal module pi_G (dense in FC-HRL, LSTM in LSTM-HRL)
  localparam int L_HIDDEN = 5;  // pi_C dense on [embedding, subgoal]
  localparam int L_ACTION = 6;  // action layer

  typedef enum logic [1:0] {K_CONV = 2'd0, K_FC = 2'd1, K_LSTM = 2'd2} layer_kind_e;

  // Where a layer reads its input vector / writes its outputs.
  typedef enum logic [2:0] {
    M_FEAT   = 3'd0,  // feature map memory (base address in the descriptor)
    M_EMB    = 3'd1,  // image embedding memory
    M_SUBG   = 3'd2,  // sub-goal memory
    M_CONCAT = 3'd3,  // embedding followed by sub-goal (read only)
    M_LOGIT  = 3'd4   // action output registers (write only)
  } mem_sel_e;

  typedef struct packed {
    layer_kind_e      kind;
    logic             relu;
    mem_sel_e         src;
    mem_sel_e         dst;
    logic [7:0]       in_h;
    logic [7:0]       in_w;
    logic [15:0]      in_c;    // channels (conv) or input length (fc)
    logic [7:0]       out_h;
    logic [7:0]       out_w;
    logic [15:0]      out_c;   // output channels (conv) or output length (fc)
    logic [1:0]       pad_t;
    logic [1:0]       pad_l;
    logic [ADDR_W-1:0] src_base;
    logic [ADDR_W-1:0] dst_base;
    logic [ADDR_W-1:0] wbase;  // start of this layer's stream in every weight bank
  } layer_cfg_t;

  typedef layer_cfg_t [NUM_LAYERS-1:0] layer_tab_t;

  // One operand fetch issued by an address generator to the PE array.
  typedef struct packed {
    logic              valid;   // a tap is fetched this cycle
    logic              first;   // first tap of a dot product (S_load)
    logic              pad;     // tap falls in the zero padding: operand 0
    logic              bias;    // bias tap: operand 1.0
    logic [ADDR_W-1:0] faddr;   // feature address (or input index)
    logic [ADDR_W-1:0] waddr;   // weight-bank address
  } ag_rd_t;

  // One result written back from PE lane 'lane'.
  typedef struct packed {
    logic              valid;
    logic [3:0]        lane;
    logic [ADDR_W-1:0] addr;
  } ag_wb_t;

  // LSTM gate order in the concatenated weight memories: i, f, o, g.
  localparam int G_I = 0;
  localparam int G_F = 1;
  localparam int G_O = 2;
  localparam int G_G = 3;

  localparam int S1_MAC1 = 0;
  localparam int S1_MAC2 = 1;
  localparam int S1_BIAS = 2;

  // Control word from the LSTM address generator to the LSTM block.
  typedef struct packed {
    logic              valid;     // a tap is fetched this cycle
    logic              first;     // first tap of a gate's dot products (S_load)
    logic              xv;        // tap index < input length: kernel MAC active
    logic              hv;        // tap index < hidden length: recurrent MAC active
    logic [ADDR_W-1:0] kaddr;     // kernel memory address
    logic [ADDR_W-1:0] raddr;     // recurrent kernel memory address
    logic [ADDR_W-1:0] baddr;     // bias memory address
    logic [7:0]        tidx;      // tap index: x_t / h_(t-1) element
    logic              sum_stb;   // both MACs hold the gate's sums: accumulate one term
    logic [1:0]        sum_sel;   // S1: term added (0 MAC1 with S_load, 1 MAC2, 2 bias)
    logic              act_stb;   // pre-activation complete: activate
    logic [1:0]        gate;      // gate being computed
    logic              cell_stb;  // all four gates of the unit ready: update c, h
    logic [7:0]        unit;      // hidden unit being computed
    logic              done;      // last unit finished
  } lstm_ag_t;

  // Output size of a 3x3, stride-2 convolution with "same" padding.
  function automatic int conv_out(input int n);
    return (n + 1) / 2;
  endfunction

  // Padding before the first row/column ("same" padding, extra pad at the end).
  function automatic int conv_pad(input int n);
    int tot;
    tot = (conv_out(n) - 1) * 2 + 3 - n;
    if (tot < 0) tot = 0;
    return tot / 2;
  endfunction

  function automatic int ceil_div(input int a, input int b);
    return (a + b - 1) / b;
  endfunction

  // Words one layer occupies in every weight bank: groups x (bias + taps).
  function automatic int layer_wwords(input int taps, input int outs, input int n_pe);
    return ceil_div(outs, n_pe) * (taps + 1);
  endfunction

  function automatic int max2(input int a, input int b);
    return (a > b) ? a : b;
  endfunction

  // Feature-map memory regions: A holds conv1/conv3 outputs, B holds the input
  // image, the conv2 output and the pi_C hidden vector.
  function automatic int feat_a_words(input int h, input int w, input int ck);
    return conv_out(h) * conv_out(w) * ck;
  endfunction

  function automatic int feat_b_words(input int h, input int w, input int c, input int ck,
                                      input int hid);
    int h2, w2;
    h2 = conv_out(conv_out(h));
    w2 = conv_out(conv_out(w));
    return max2(max2(h * w * c, h2 * w2 * ck), hid);
  endfunction

  function automatic int flat_len(input int h, input int w, input int ck);
    return conv_out(conv_out(conv_out(h))) * conv_out(conv_out(conv_out(w))) * ck;
  endfunction

  function automatic int weight_depth(input int h, input int w, input int c, input int ck,
                                      input int emb, input int sub, input int hid,
                                      input int nact, input int n_pe);
    int d;
    d = layer_wwords(9 * c, ck, n_pe) + 2 * layer_wwords(9 * ck, ck, n_pe);
    d += layer_wwords(flat_len(h, w, ck), emb, n_pe);
    d += layer_wwords(emb, sub, n_pe);
    d += layer_wwords(emb + sub, hid, n_pe);
    d += layer_wwords(hid, nact, n_pe);
    return d;
  endfunction

  function automatic layer_cfg_t make_layer(
      input layer_kind_e kind, input bit relu, input mem_sel_e src, input mem_sel_e dst,
      input int in_h, input int in_w, input int in_c, input int out_h, input int out_w,
      input int out_c, input int pad_t, input int pad_l, input int src_base,
      input int dst_base, input int wbase);
    layer_cfg_t l;
    l.kind     = kind;
    l.relu     = relu;
    l.src      = src;
    l.dst      = dst;
    l.in_h     = 8'(in_h);
    l.in_w     = 8'(in_w);
    l.in_c     = 16'(in_c);
    l.out_h    = 8'(out_h);
    l.out_w    = 8'(out_w);
    l.out_c    = 16'(out_c);
    l.pad_t    = 2'(pad_t);
    l.pad_l    = 2'(pad_l);
    l.src_base = ADDR_W'(src_base);
    l.dst_base = ADDR_W'(dst_base);
    l.wbase    = ADDR_W'(wbase);
    return l;
  endfunction

  // The per-frame layer schedule (Table 1 of the network description).
  function automatic layer_tab_t build_layers(input int h, input int w, input int c,
                                              input int ck, input int emb, input int sub,
                                              input int hid, input int nact, input int n_pe);
    layer_tab_t t;
    int a_base, b_base, wb;
    int h1, w1, h2, w2, h3, w3;
    a_base = 0;
    b_base = feat_a_words(h, w, ck);
    h1 = conv_out(h);  w1 = conv_out(w);
    h2 = conv_out(h1); w2 = conv_out(w1);
    h3 = conv_out(h2); w3 = conv_out(w2);
    wb = 0;
    t[L_CONV1] = make_layer(K_CONV, 1'b1, M_FEAT, M_FEAT, h, w, c, h1, w1, ck,
                            conv_pad(h), conv_pad(w), b_base, a_base, wb);
    wb += layer_wwords(9 * c, ck, n_pe);
    t[L_CONV2] = make_layer(K_CONV, 1'b1, M_FEAT, M_FEAT, h1, w1, ck, h2, w2, ck,
                            conv_pad(h1), conv_pad(w1), a_base, b_base, wb);
    wb += layer_wwords(9 * ck, ck, n_pe);
    t[L_CONV3] = make_layer(K_CONV, 1'b1, M_FEAT, M_FEAT, h2, w2, ck, h3, w3, ck,
                            conv_pad(h2), conv_pad(w2), b_base, a_base, wb);
    wb += layer_wwords(9 * ck, ck, n_pe);
    t[L_EMB]    = make_layer(K_FC, 1'b1, M_FEAT, M_EMB, 1, 1, h3 * w3 * ck, 1, 1, emb,
                             0, 0, a_base, 0, wb);
    wb += layer_wwords(h3 * w3 * ck, emb, n_pe);
    t[L_SUBG]   = make_layer(K_FC, 1'b1, M_EMB, M_SUBG, 1, 1, emb, 1, 1, sub,
                             0, 0, 0, 0, wb);
    wb += layer_wwords(emb, sub, n_pe);
    t[L_HIDDEN] = make_layer(K_FC, 1'b1, M_CONCAT, M_FEAT, 1, 1, emb + sub, 1, 1, hid,
                             0, 0, 0, b_base, wb);
    wb += layer_wwords(emb + sub, hid, n_pe);
    t[L_ACTION] = make_layer(K_FC, 1'b0, M_FEAT, M_LOGIT, 1, 1, hid, 1, 1, nact,
                             0, 0, b_base, 0, wb);
    return t;
  endfunction

  // Fixed-point multiply: full product, arithmetic shift by FRAC, truncate.
  function automatic fx_t fxmul(input fx_t a, input fx_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return fx_t'(p >>> FRAC);
  endfunction

  // hardtanh(x): -1 below -1, x inside [-1, 1], +1 above 1.
  function automatic fx_t hard_tanh(input fx_t x);
    if (x < -FX_ONE) return -FX_ONE;
    if (x > FX_ONE)  return FX_ONE;
    return x;
  endfunction

  // 0.2 and 0.5 in Q16.16 (0.2 rounded to nearest).
  localparam fx_t FX_0P2 = fx_t'(13107);
  localparam fx_t FX_0P5 = fx_t'(32768);
  localparam fx_t FX_2P5 = fx_t'(163840);

  // hardsigmoid(x): 0 below -2.5, 0.2x + 0.5 inside [-2.5, 2.5], 1 above 2.5.
  function automatic fx_t hard_sigmoid(input fx_t x);
    if (x < -FX_2P5) return '0;
    if (x > FX_2P5)  return FX_ONE;
    return fxmul(x, FX_0P2) + FX_0P5;
  endfunction

endpackage
