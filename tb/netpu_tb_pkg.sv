// netpu_tb_pkg: test support for the NetPU-M testbenches.
//
// net_model describes one MLP (layer settings, parameters, weights, dataset
// input), builds the 64-bit input stream in the order the accelerator
// expects, and computes the expected result with a plain element-by-element
// reference model written independently of the RTL: products of each
// activation and weight, sums, batch normalization, activation and
// quantization with the same number formats as the hardware.
package netpu_tb_pkg;
  import netpu_pkg::*;

  // ---------------------------------------------------------------- arithmetic
  function automatic longint sat37(longint v);
    longint mx, mn;
    mx = (longint'(1) << 36) - 1;
    mn = -(longint'(1) << 36);
    if (v > mx) return mx;
    if (v < mn) return mn;
    return v;
  endfunction

  // piecewise-linear sigmoid, argument and result in 1/32 units
  function automatic longint ref_sigmoid(longint v);
    longint a, f;
    a = (v < 0) ? -v : v;
    if (a >= 5 * 32)                  f = 32;
    else if (a * 1000 >= 2375 * 32)   f = a / 32 + 27;   // 0.84375 = 27/32
    else if (a >= 32)                 f = a / 8 + 20;    // 0.625   = 20/32
    else                              f = a / 4 + 16;    // 0.5     = 16/32
    return (v < 0) ? 32 - f : f;
  endfunction

  function automatic longint floor_div(longint a, longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic int ref_quan(longint v, int bits, longint scale, longint offs);
    longint r, qmax;
    r = floor_div(v * scale + offs * 65536 + (longint'(1) << 20), longint'(1) << 21);
    qmax = (longint'(1) << bits) - 1;
    if (r < 0) return 0;
    if (r > qmax) return int'(qmax);
    return int'(r);
  endfunction

  // ---------------------------------------------------------------- model
  class net_model;
    int          nl;
    layer_cfg_t  cfg[16];
    // per layer, per neuron (input layer: per TNPU slot 0..7)
    int          bias   [16][];
    longint      bn_s   [16][];
    longint      bn_o   [16][];
    longint      sthr   [16][];
    longint      mthr   [16][];   // neuron * 15 + i
    longint      q_s    [16][];
    longint      q_o    [16][];
    int          wt     [16][];   // neuron * in_len + element
    int          pixels [];
    logic [63:0] stream [$];
    int          exp_class;
    longint      exp_max;
    int          n_weight_words;
    int          act_ref [16][];  // reference outputs of each non-output layer

    function int nparam(int l);
      return (cfg[l].ltype == LT_INPUT) ? NUM_TNPU
           : ((int'(cfg[l].neurons) + NUM_TNPU - 1) / NUM_TNPU) * NUM_TNPU;
    endfunction

    function int in_words(int l);
      int epw;
      epw = (cfg[l].ltype == LT_INPUT || cfg[l].in_prec != 0) ? 8 : 64;
      return (int'(cfg[l].in_len) + epw - 1) / epw;
    endfunction

    // allocate parameters of layer l with values suited to its sizes
    function void gen_params(int l);
      int np, L, ob, lv;
      longint spread;
      np = nparam(l);
      L  = int'(cfg[l].in_len);
      ob = int'(cfg[l].out_prec) + 1;
      lv = (1 << ob) - 1;
      bias[l] = new[np]; bn_s[l] = new[np]; bn_o[l] = new[np]; sthr[l] = new[np];
      mthr[l] = new[np * MT_NUM]; q_s[l] = new[np]; q_o[l] = new[np];
      // typical spread of a neuron's sum, in 1/32 units
      if (cfg[l].ltype == LT_INPUT) spread = 128 * 32;
      else spread = longint'($sqrt(real'(L)) * 3.0 * 32.0) + 32;
      for (int n = 0; n < np; n++) begin
        bias[l][n] = int'($urandom_range(0, 255)) - 128;
        bn_s[l][n] = longint'($urandom_range(0, 96)) - 48;       // -1.5 .. 1.5
        bn_o[l][n] = longint'($urandom_range(0, 1000)) - 500;
        if (cfg[l].ltype == LT_INPUT)
          sthr[l][n] = longint'($urandom_range(0, 255 * 32));
        else
          sthr[l][n] = longint'($urandom_range(0, 2 * spread)) - spread;
        begin
          longint base;
          base = (cfg[l].ltype == LT_INPUT) ? 0 : -spread;
          for (int i = 0; i < MT_NUM; i++) begin
            base = base + longint'($urandom_range(1, 2 * spread / lv + 1));
            mthr[l][n * MT_NUM + i] = base;
          end
        end
        unique case (cfg[l].act)
          ACT_SIGMOID: begin q_s[l][n] = longint'(lv) * 65536; q_o[l][n] = 0; end
          ACT_TANH:    begin q_s[l][n] = longint'(lv) * 32768; q_o[l][n] = longint'(lv) * 16; end
          default: begin
            q_s[l][n] = (longint'(lv) * 65536 * 32) / (spread + 1) + longint'($urandom_range(0, 2000));
            q_o[l][n] = longint'($urandom_range(0, 64)) - 32;
          end
        endcase
      end
      if (cfg[l].ltype != LT_INPUT) begin
        wt[l] = new[int'(cfg[l].neurons) * L];
        for (int i = 0; i < int'(cfg[l].neurons) * L; i++)
          wt[l][i] = int'($urandom_range(0, (1 << (int'(cfg[l].w_prec) + 1)) - 1));
      end
    endfunction

    function void gen_pixels();
      pixels = new[int'(cfg[0].in_len)];
      foreach (pixels[i]) pixels[i] = int'($urandom_range(0, 255));
    endfunction

    // ------------------------------------------------------------ reference
    function int act_out(int l, int n, longint v);
      int ob;
      ob = int'(cfg[l].out_prec) + 1;
      unique case (cfg[l].act)
        ACT_SIGN: return (v >= sthr[l][n]) ? 1 : 0;
        ACT_MT: begin
          int c;
          c = 0;
          for (int i = 0; i < (1 << ob) - 1 && i < MT_NUM; i++)
            if (v > mthr[l][n * MT_NUM + i]) c++;
          return c;
        end
        ACT_RELU:    return ref_quan((v < 0) ? 0 : v, ob, q_s[l][n], q_o[l][n]);
        ACT_SIGMOID: return ref_quan(ref_sigmoid(v), ob, q_s[l][n], q_o[l][n]);
        ACT_TANH:    return ref_quan(2 * ref_sigmoid(2 * v) - 32, ob, q_s[l][n], q_o[l][n]);
        default:     return 0;
      endcase
    endfunction

    function void reference();
      int a [];
      int na [];
      a = new[int'(cfg[0].in_len)];
      act_ref[0] = new[int'(cfg[0].in_len)];
      foreach (a[e]) begin
        longint v;
        int slot;
        v = longint'(pixels[e]) * 32;
        slot = e % NUM_TNPU;
        if (cfg[0].act == ACT_SIGN || cfg[0].act == ACT_MT) a[e] = act_out(0, slot, v);
        else a[e] = ref_quan(v, int'(cfg[0].out_prec) + 1, q_s[0][slot], q_o[0][slot]);
        act_ref[0][e] = a[e];
      end
      for (int l = 1; l < nl; l++) begin
        int N, L, ib, wb;
        N = int'(cfg[l].neurons);
        L = int'(cfg[l].in_len);
        ib = int'(cfg[l].in_prec) + 1;
        wb = int'(cfg[l].w_prec) + 1;
        na = new[N];
        exp_max = 0; exp_class = -1;
        for (int n = 0; n < N; n++) begin
          longint acc, v;
          acc = cfg[l].bn_fold ? longint'(bias[l][n]) : 0;
          for (int e = 0; e < L; e++) begin
            int x, w;
            x = a[e] & ((1 << ib) - 1);
            w = wt[l][n * L + e];
            if (ib == 1) acc += (x == (w & 1)) ? 1 : -1;
            else begin
              if (wb == 1) w = (w & 1) ? 1 : -1;
              else if (w >= (1 << (wb - 1))) w = w - (1 << wb);
              acc += longint'(x) * longint'(w);
            end
          end
          acc = longint'(int'(acc));    // 32-bit accumulator
          if (cfg[l].bn_fold) v = acc * 32;
          else v = sat37(acc * bn_s[l][n] + bn_o[l][n]);
          if (cfg[l].ltype == LT_OUTPUT) begin
            if (exp_class < 0 || v > exp_max) begin exp_max = v; exp_class = n; end
          end else begin
            na[n] = act_out(l, n, v);
          end
        end
        a = na;
        act_ref[l] = na;
      end
    endfunction

    // expected output word w of layer l, packed as the next layer reads it
    function logic [63:0] out_word(int l, int w);
      logic [63:0] wd;
      int n;
      wd = '0;
      n = act_ref[l].size();
      if (cfg[l].out_prec == 0) begin
        for (int i = 0; i < 64; i++) if (w * 64 + i < n) wd[i] = act_ref[l][w * 64 + i][0];
      end else begin
        for (int i = 0; i < 8; i++) if (w * 8 + i < n) wd[i*8 +: 8] = 8'(act_ref[l][w * 8 + i]);
      end
      return wd;
    endfunction

    // ------------------------------------------------------------ stream
    function void push_params(int l);
      int np;
      np = nparam(l);
      for (int p = 0; p < NUM_PRM; p++) begin
        longint vals [$];
        if (!prm_used(cfg[l], prm_e'(p))) continue;
        vals = {};
        for (int n = 0; n < np; n++) begin
          unique case (prm_e'(p))
            PRM_SIGN_THR: vals.push_back(sthr[l][n]);
            PRM_MT_THR:   for (int i = 0; i < mt_count(cfg[l].out_prec); i++)
                            vals.push_back(mthr[l][n * MT_NUM + i]);
            PRM_BIAS:     vals.push_back(longint'(bias[l][n]));
            PRM_BN_SCALE: vals.push_back(bn_s[l][n]);
            PRM_BN_OFFS:  vals.push_back(bn_o[l][n]);
            PRM_Q_SCALE:  vals.push_back(q_s[l][n]);
            PRM_Q_OFFS:   vals.push_back(q_o[l][n]);
            default: ;
          endcase
        end
        if (prm_e'(p) == PRM_BIAS) begin
          for (int i = 0; i < vals.size(); i += 8) begin
            logic [63:0] wd;
            for (int j = 0; j < 8; j++) wd[j*8 +: 8] = vals[i + j][7:0];
            stream.push_back(wd);
          end
        end else begin
          for (int i = 0; i < vals.size(); i += 2)
            stream.push_back({vals[i + 1][31:0], vals[i][31:0]});
        end
      end
    endfunction

    function void push_weights(int l);
      int N, L, K, nb, epw;
      if (cfg[l].ltype == LT_INPUT) return;
      N = int'(cfg[l].neurons);
      L = int'(cfg[l].in_len);
      epw = (cfg[l].in_prec == 0) ? 64 : 8;
      K = (L + epw - 1) / epw;
      nb = (N + NUM_TNPU - 1) / NUM_TNPU;
      for (int b = 0; b < nb; b++)
        for (int k = 0; k < K; k++)
          for (int t = 0; t < NUM_TNPU && b * NUM_TNPU + t < N; t++) begin
            logic [63:0] wd;
            int n;
            n = b * NUM_TNPU + t;
            wd = '0;
            for (int i = 0; i < epw; i++) begin
              int e;
              e = k * epw + i;
              if (e < L) begin
                if (epw == 64) wd[i] = wt[l][n * L + e][0];
                else wd[i*8 +: 8] = 8'(wt[l][n * L + e]);
              end
            end
            stream.push_back(wd);
            n_weight_words++;
          end
    endfunction

    function void build_stream(int num_lpu);
      stream = {};
      n_weight_words = 0;
      stream.push_back(64'(nl));
      for (int l = 0; l < nl; l++) stream.push_back(64'(cfg[l]));
      for (int i = 0; i < pixels.size(); i += 8) begin
        logic [63:0] wd;
        wd = '0;
        for (int j = 0; j < 8; j++)
          if (i + j < pixels.size()) wd[j*8 +: 8] = 8'(pixels[i + j]);
        stream.push_back(wd);
      end
      for (int l = 0; l < num_lpu && l < nl; l++) push_params(l);
      for (int l = 0; l < nl; l++) begin
        push_weights(l);
        if (l + num_lpu < nl) push_params(l + num_lpu);
      end
    endfunction

    // ------------------------------------------------------------ networks
    function void set_layer(int l, layer_type_e t, act_e a, bit fold,
                            int ip, int wp, int op, int neurons, int in_len);
      cfg[l] = '{ltype: t, act: a, bn_fold: fold, in_prec: 3'(ip), w_prec: 3'(wp),
                 out_prec: 3'(op), neurons: 16'(neurons), in_len: 16'(in_len)};
    endfunction

    // random small network
    function void randomize_net(int max_neurons);
      int prev_n, prev_op;
      nl = int'($urandom_range(3, 6));
      begin
        int L;
        act_e a;
        int op;
        L = int'($urandom_range(5, 40));
        a = act_e'($urandom_range(0, 4));
        op = (a == ACT_SIGN) ? 0 : (a == ACT_MT) ? int'($urandom_range(0, 3))
                                               : int'($urandom_range(0, 7));
        set_layer(0, LT_INPUT, a, 1'b0, 7, 7, op, L, L);
        prev_n = L; prev_op = op;
      end
      for (int l = 1; l < nl; l++) begin
        int n, wp, op;
        act_e a;
        bit last;
        last = (l == nl - 1);
        n = last ? int'($urandom_range(2, 12)) : int'($urandom_range(1, max_neurons));
        wp = (prev_op == 0) ? 0 : int'($urandom_range(0, 7));
        a = act_e'($urandom_range(0, 4));
        op = (a == ACT_SIGN) ? 0 : (a == ACT_MT) ? int'($urandom_range(0, 3))
                                               : int'($urandom_range(0, 7));
        set_layer(l, last ? LT_OUTPUT : LT_HIDDEN, a, 1'($urandom_range(0, 1)),
                  prev_op, wp, op, n, prev_n);
        prev_n = n; prev_op = op;
      end
      for (int l = 0; l < nl; l++) gen_params(l);
      gen_pixels();
      reference();
    endfunction

    // MLP of the evaluated kind: input quantization layer, three hidden layers
    // of the same width, output layer of 10 classes on 784 inputs
    function void mlp(int hidden, int wbits, int abits, act_e hact, bit fold);
      nl = 5;
      set_layer(0, LT_INPUT, (abits == 1) ? ACT_SIGN : ACT_MT, 1'b0, 7, 7,
                abits - 1, 784, 784);
      set_layer(1, LT_HIDDEN, hact, fold, abits - 1, wbits - 1, abits - 1, hidden, 784);
      set_layer(2, LT_HIDDEN, hact, fold, abits - 1, wbits - 1, abits - 1, hidden, hidden);
      set_layer(3, LT_HIDDEN, hact, fold, abits - 1, wbits - 1, abits - 1, hidden, hidden);
      set_layer(4, LT_OUTPUT, hact, fold, abits - 1, wbits - 1, abits - 1, 10, hidden);
      for (int l = 0; l < nl; l++) gen_params(l);
      gen_pixels();
      reference();
    endfunction
  endclass

endpackage
