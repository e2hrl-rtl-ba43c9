// e2hrl_tb_core: stimulus and reference model for end-to-end tests of e2hrl_top.
//
// Drives the accelerator through its ports: generates random weights for every
// layer and the LSTM, loads them, then runs a sequence of frames with fresh
// random images: an FC-HRL episode (use_lstm = 0, K = 3) and an LSTM-HRL
// episode (use_lstm = 1, K = 2). A behavioural model of the network, written
// here independently of the RTL (3x3 stride-2 "same" convolutions in HWC order,
// dense layers, hard-sigmoid/hard-tanh LSTM, Q16.16 arithmetic), predicts every
// frame's action-layer outputs and action, whether pi_G runs, and the frame's
// cycle count. It also counts how often each mechanism occurred (padding taps,
// ReLU clipping, subgoal branch run and skipped, LSTM and FC subgoal modes,
// hard-sigmoid and hard-tanh saturation, subgoal reuse) and fails any that
// never did. Parameters must match the instantiated e2hrl_top.
//
// With STANDALONE = 1 it prints the TB_RESULT line and ends the simulation
// itself; with STANDALONE = 0 it raises 'finished' and exposes its check and
// failure counts (n_checks, n_failures) so one testbench can run several cores
// side by side. A watchdog of 50 M cycles counts a failure and ends the run.
module e2hrl_tb_core #(
  parameter int N_PE   = 8,
  parameter int IMG_H  = 30,
  parameter int IMG_W  = 40,
  parameter int IMG_C  = 3,
  parameter int CONV_K = 32,
  parameter int EMB    = 32,
  parameter int SUB    = 32,
  parameter int HID_C  = 32,
  parameter int N_ACT  = 3,
  parameter int FRAMES_PER_EPISODE = 4,
  // 1: print the result line and end the simulation; 0: raise 'finished' and
  // leave the report to an enclosing testbench that runs several cores
  parameter bit STANDALONE = 1
) (
  input  logic                      clk,
  output logic                      rst_n,
  output logic                      ld_we,
  output logic [2:0]                ld_target,
  output logic [$clog2(N_PE+1)-1:0] ld_bank,
  output logic [19:0]               ld_addr,
  output logic signed [31:0]        ld_data,
  output logic                      start,
  output logic                      episode_start,
  output logic                      use_lstm,
  output logic [7:0]                k_param,
  input  logic                      busy,
  input  logic                      done,
  input  logic                      branch_run,
  input  logic [7:0]                k_count,
  input  logic signed [31:0]        logits [N_ACT],
  input  logic [$clog2(N_ACT)-1:0]  action,
  output logic                      finished,
  output int                        n_checks,
  output int                        n_failures
);
  typedef logic signed [31:0] word_t;

  int checks = 0, failures = 0;
  assign n_checks   = checks;
  assign n_failures = failures;
  int n_pad = 0, n_relu_clip = 0, n_branch_run = 0, n_branch_skip = 0;
  int n_lstm_run = 0, n_fc_run = 0, n_hs_sat = 0, n_ht_sat = 0, n_hs_lin = 0;

  // ---------------- fixed-point reference arithmetic ----------------
  function automatic word_t mul(word_t a, word_t b);
    longint p;
    p = longint'(a) * longint'(b);
    return word_t'(p >>> 16);
  endfunction

  function automatic word_t hsig(word_t x);
    if (x < -32'sd163840) begin n_hs_sat++; return 0; end
    if (x > 32'sd163840)  begin n_hs_sat++; return 32'sd65536; end
    n_hs_lin++;
    return mul(x, 32'sd13107) + 32'sd32768;
  endfunction

  function automatic word_t htanh(word_t x);
    if (x < -32'sd65536) begin n_ht_sat++; return -32'sd65536; end
    if (x > 32'sd65536)  begin n_ht_sat++; return 32'sd65536; end
    return x;
  endfunction

  function automatic word_t relu(word_t x);
    if (x < 0) begin n_relu_clip++; return 0; end
    return x;
  endfunction

  function automatic int cout(int n); return (n + 1) / 2; endfunction
  function automatic int cpad(int n);
    int t;
    t = (cout(n) - 1) * 2 + 3 - n;
    return (t < 0) ? 0 : t / 2;
  endfunction
  function automatic int cdiv(int a, int b); return (a + b - 1) / b; endfunction

  // ---------------- sizes and layouts ----------------
  localparam int H1 = (IMG_H + 1) / 2, W1 = (IMG_W + 1) / 2;
  localparam int H2 = (H1 + 1) / 2,    W2 = (W1 + 1) / 2;
  localparam int H3 = (H2 + 1) / 2,    W3 = (W2 + 1) / 2;
  localparam int FLAT = H3 * W3 * CONV_K;
  localparam int B_BASE = H1 * W1 * CONV_K;      // feature region B
  localparam int TL = (EMB > SUB) ? EMB : SUB;

  // weight bank images
  word_t wb [N_PE][$];
  int    lbase [7];
  int    ltaps [7];
  int    louts [7];

  word_t kern [], recw [], bias [];
  word_t img [];
  word_t h_state [], c_state [], subgoal [];

  // weight of output o, tap t (t = 0 is the bias) of layer l
  function automatic word_t wgt(int l, int o, int t);
    return wb[o % N_PE][lbase[l] + (o / N_PE) * (ltaps[l] + 1) + t];
  endfunction

  function automatic word_t rnd(int mag);  // uniform in (-mag, mag)
    return word_t'($urandom_range(2 * mag - 2, 0)) - word_t'(mag - 1);
  endfunction

  // 3x3 stride-2 same-padded conv, HWC; taps ky, kx, ic
  function automatic void conv(int l, input word_t x [], int ih, int iw, int ic,
                               output word_t y []);
    int oh, ow;
    oh = cout(ih); ow = cout(iw);
    y = new [oh * ow * CONV_K];
    for (int oy = 0; oy < oh; oy++)
      for (int ox = 0; ox < ow; ox++)
        for (int oc = 0; oc < CONV_K; oc++) begin
          word_t s;
          int t;
          s = wgt(l, oc, 0);
          t = 1;
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++)
              for (int c = 0; c < ic; c++) begin
                int yy, xx;
                yy = oy * 2 + ky - cpad(ih);
                xx = ox * 2 + kx - cpad(iw);
                if (yy >= 0 && yy < ih && xx >= 0 && xx < iw)
                  s += mul(x[(yy * iw + xx) * ic + c], wgt(l, oc, t));
                else if (oc == 0) n_pad++;
                t++;
              end
          y[(oy * ow + ox) * CONV_K + oc] = relu(s);
        end
  endfunction

  function automatic void dense(int l, input word_t x [], int nout, bit do_relu,
                                output word_t y []);
    y = new [nout];
    for (int o = 0; o < nout; o++) begin
      word_t s;
      s = wgt(l, o, 0);
      for (int i = 0; i < x.size(); i++) s += mul(x[i], wgt(l, o, i + 1));
      y[o] = do_relu ? relu(s) : s;
    end
  endfunction

  function automatic void lstm_step(input word_t x []);
    word_t hn [];
    hn = new [SUB];
    for (int j = 0; j < SUB; j++) begin
      word_t g [4];
      for (int q = 0; q < 4; q++) begin
        word_t s;
        s = bias[q * SUB + j];
        for (int t = 0; t < EMB; t++) s += mul(kern[(q * SUB + j) * EMB + t], x[t]);
        for (int t = 0; t < SUB; t++) s += mul(recw[(q * SUB + j) * SUB + t], h_state[t]);
        g[q] = (q == 3) ? htanh(s) : hsig(s);
      end
      c_state[j] = mul(g[1], c_state[j]) + mul(g[0], g[3]);
      hn[j] = mul(htanh(c_state[j]), g[2]);
    end
    h_state = hn;
    subgoal = hn;
  endfunction

  // ---------------- expected cycle counts ----------------
  function automatic int conv_cycles(int ih, int iw, int ic);
    return cout(ih) * cout(iw) * cdiv(CONV_K, N_PE) * (9 * ic + 1 + 1 + N_PE);
  endfunction
  function automatic int fc_cycles(int nin, int nout);
    return cdiv(nout, N_PE) * (nin + 1 + 1 + N_PE);
  endfunction

  function automatic int frame_cycles(bit run_branch, bit lstm);
    int c;
    c = 1;
    c += conv_cycles(IMG_H, IMG_W, IMG_C) + 2;
    c += conv_cycles(H1, W1, CONV_K) + 2;
    c += conv_cycles(H2, W2, CONV_K) + 2;
    c += fc_cycles(FLAT, EMB) + 2;
    if (run_branch) c += (lstm ? SUB * (4 * (TL + 6) + 1) : fc_cycles(EMB, SUB)) + 2;
    c += fc_cycles(EMB + SUB, HID_C) + 2;
    c += fc_cycles(HID_C, N_ACT) + 2;
    return c;
  endfunction

  // ---------------- clock, watchdog ----------------
  initial begin
    repeat (50_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- load helpers ----------------
  task automatic load(input logic [2:0] tgt, input int bank, input int addr, input word_t d);
    ld_we     <= 1'b1;
    ld_target <= tgt;
    ld_bank   <= ($clog2(N_PE+1))'(bank);
    ld_addr   <= 20'(addr);
    ld_data   <= d;
    @(posedge clk);
  endtask

  task automatic load_end();
    ld_we <= 1'b0;
    @(posedge clk);
  endtask

  task automatic run_frame(input bit lstm, input int kval, input bit exp_run);
    word_t f1 [], f2 [], f3 [], emb [], hid [], lg [], cat [];
    int cyc, exp_cyc, best;
    // new random observation
    foreach (img[i]) begin
      img[i] = word_t'($urandom_range(65535, 0));
      load(3'd1, 0, B_BASE + i, img[i]);
    end
    load_end();
    // reference
    conv(0, img, IMG_H, IMG_W, IMG_C, f1);
    conv(1, f1, H1, W1, CONV_K, f2);
    conv(2, f2, H2, W2, CONV_K, f3);
    dense(3, f3, EMB, 1'b1, emb);
    if (exp_run) begin
      n_branch_run++;
      if (lstm) begin lstm_step(emb); n_lstm_run++; end
      else begin dense(4, emb, SUB, 1'b1, subgoal); n_fc_run++; end
    end else begin
      n_branch_skip++;
    end
    cat = new [EMB + SUB];
    for (int i = 0; i < EMB; i++) cat[i] = emb[i];
    for (int i = 0; i < SUB; i++) cat[EMB + i] = subgoal[i];
    dense(5, cat, HID_C, 1'b1, hid);
    dense(6, hid, N_ACT, 1'b0, lg);
    best = 0;
    for (int i = 1; i < N_ACT; i++) if (lg[i] > lg[best]) best = i;
    exp_cyc = frame_cycles(exp_run, lstm);
    // run
    use_lstm <= lstm;
    k_param  <= 8'(kval);
    start    <= 1'b1;
    @(posedge clk);
    start    <= 1'b0;
    cyc = 1;
    forever begin #1; if (done) break; @(posedge clk); cyc++; end
    // at this edge done is high: compare
    checks++;
    if (branch_run !== exp_run) begin
      failures++;
      $display("FAIL branch_run=%0b expected %0b", branch_run, exp_run);
    end
    for (int i = 0; i < N_ACT; i++) begin
      checks++;
      if (logits[i] !== lg[i]) begin
        failures++;
        $display("FAIL logit[%0d]=%0d expected %0d", i, logits[i], lg[i]);
      end
    end
    checks++;
    if (32'(action) != best) begin
      failures++;
      $display("FAIL action=%0d expected %0d", action, best);
    end
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL frame took %0d cycles, expected %0d", cyc, exp_cyc);
    end
    $display("frame lstm=%0b K=%0d branch=%0b cycles=%0d action=%0d", lstm, kval, exp_run,
             cyc, action);
    @(posedge clk);
  endtask

  task automatic new_episode();
    foreach (h_state[i]) begin h_state[i] = 0; c_state[i] = 0; subgoal[i] = 0; end
    episode_start <= 1'b1;
    @(posedge clk);
    episode_start <= 1'b0;
    @(posedge clk);
  endtask

  // ---------------- main sequence ----------------
  initial begin
    int taps [7], outs [7], wbase;
    rst_n = 1'b0; ld_we = 1'b0; ld_target = '0; ld_bank = '0; ld_addr = '0; ld_data = '0;
    finished = 1'b0;
    start = 1'b0; episode_start = 1'b0; use_lstm = 1'b0; k_param = 8'd1;
    img = new [IMG_H * IMG_W * IMG_C];
    kern = new [4 * SUB * EMB];
    recw = new [4 * SUB * SUB];
    bias = new [4 * SUB];
    h_state = new [SUB]; c_state = new [SUB]; subgoal = new [SUB];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // layer weight streams
    taps = '{9 * IMG_C, 9 * CONV_K, 9 * CONV_K, FLAT, EMB, EMB + SUB, HID_C};
    outs = '{CONV_K, CONV_K, CONV_K, EMB, SUB, HID_C, N_ACT};
    wbase = 0;
    for (int l = 0; l < 7; l++) begin
      lbase[l] = wbase;
      ltaps[l] = taps[l];
      louts[l] = outs[l];
      wbase += cdiv(outs[l], N_PE) * (taps[l] + 1);
    end
    for (int p = 0; p < N_PE; p++)
      for (int a = 0; a < wbase; a++) begin
        int l, rel, t, mag;
        word_t v;
        l = 0;
        while (l < 6 && a >= lbase[l + 1]) l++;
        rel = a - lbase[l];
        t = rel % (taps[l] + 1);
        // scale so activations stay in a useful range; biases slightly negative
        mag = (l <= 2) ? 24000 : (l == 3) ? 6000 : 20000;
        v = rnd(mag);
        if (t == 0) v = v / 4 + 32'sd3000;
        wb[p].push_back(v);
        load(3'd0, p, a, v);
      end
    foreach (kern[i]) begin kern[i] = rnd(40000); load(3'd2, 0, i, kern[i]); end
    foreach (recw[i]) begin recw[i] = rnd(40000); load(3'd3, 0, i, recw[i]); end
    foreach (bias[i]) begin bias[i] = rnd(250000); load(3'd4, 0, i, bias[i]); end
    load_end();

    // FC-HRL episode, K = 3: subgoal on frames 0 and 3
    new_episode();
    for (int f = 0; f < FRAMES_PER_EPISODE; f++) run_frame(1'b0, 3, (f % 3) == 0);
    // LSTM-HRL episode, K = 2: subgoal on frames 0, 2, ...
    new_episode();
    for (int f = 0; f < FRAMES_PER_EPISODE; f++) run_frame(1'b1, 2, (f % 2) == 0);

    // every mechanism must have happened
    begin
      string names [9];
      int    cnt   [9];
      names = '{"padding", "relu_clip", "branch_run", "branch_skip", "lstm_subgoal",
                "fc_subgoal", "hsig_saturate", "htanh_saturate", "hsig_linear"};
      cnt   = '{n_pad, n_relu_clip, n_branch_run, n_branch_skip, n_lstm_run, n_fc_run,
                n_hs_sat, n_ht_sat, n_hs_lin};
      for (int i = 0; i < 9; i++) begin
        checks++;
        $display("mechanism %s: %0d", names[i], cnt[i]);
        if (cnt[i] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", names[i]);
        end
      end
    end
    if (STANDALONE) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    finished = 1'b1;
  end
endmodule
