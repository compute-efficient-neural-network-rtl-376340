// tb_nn_pkg: reference model and host-side helpers shared by the chain and
// accelerator testbenches.
//
// It holds a small network shaped like the processor mapping of GoogLeNet
// (a 7x7 stride-2 first layer on P1 with filter columns folded into the 21
// input lanes, a 1x1 convolution and a max pooling on P2, two 1x1 layers on
// P3 through its self-loop, a fully connected classifier on P4), the integer
// reference of every layer, and the packing of weights, biases and
// instructions into configuration-bus writes for processors of any shape.
// The reference models are written independently of the RTL; the instruction
// packing follows this design's own instruction format.
package tb_nn_pkg;
  import nn_pkg::*;

  typedef struct {
    cfg_target_e tg;
    int          proc;
    int          addr;
    logic [63:0] data;
  } cfg_item_t;

  typedef int iarr_t [];

  function automatic int aux_ref(longint a, int sh, bit rl);
    longint v;
    v = (sh == 0) ? a : (a + (64'sd1 <<< (sh - 1))) >>> sh;
    if (rl && v < 0) v = 0;
    return (v > 127) ? 127 : (v < -128) ? -128 : int'(v);
  endfunction

  // y[ho][wo][co] = aux(bias[co] + sum w[co][fy][fx][ci] * x[ho*S+fy][wo*S+fx][ci])
  function automatic iarr_t conv_ref(iarr_t x, int H, int W, int C, iarr_t w, iarr_t b,
                                     int CO, int FY, int FX, int S, int sh, bit rl);
    int HO, WO;
    iarr_t y;
    HO = (H - FY) / S + 1;
    WO = (W - FX) / S + 1;
    y = new[HO * WO * CO];
    for (int ho = 0; ho < HO; ho++) for (int wo = 0; wo < WO; wo++) for (int co = 0; co < CO; co++) begin
      longint acc;
      acc = b[co];
      for (int fy = 0; fy < FY; fy++) for (int fx = 0; fx < FX; fx++) for (int ci = 0; ci < C; ci++)
        acc += longint'(w[((co*FY + fy)*FX + fx)*C + ci]) * x[((ho*S + fy)*W + wo*S + fx)*C + ci];
      y[(ho*WO + wo)*CO + co] = aux_ref(acc, sh, rl);
    end
    return y;
  endfunction

  function automatic iarr_t pool_ref(iarr_t x, int H, int W, int C, int F, int S);
    int HO, WO;
    iarr_t y;
    HO = (H - F) / S + 1;
    WO = (W - F) / S + 1;
    y = new[HO * WO * C];
    for (int ho = 0; ho < HO; ho++) for (int wo = 0; wo < WO; wo++) for (int c = 0; c < C; c++) begin
      int m;
      m = -1000;
      for (int fy = 0; fy < F; fy++) for (int fx = 0; fx < F; fx++)
        if (x[((ho*S + fy)*W + wo*S + fx)*C + c] > m) m = x[((ho*S + fy)*W + wo*S + fx)*C + c];
      y[(ho*WO + wo)*C + c] = m;
    end
    return y;
  endfunction

  function automatic iarr_t rand_arr(int n, int lo, int hi);
    iarr_t a;
    a = new[n];
    foreach (a[i]) a[i] = $urandom_range(0, hi - lo) + lo;
    return a;
  endfunction

  // Weight store words of one layer: word w_base + g*KB*T + kb*T + t,
  // kb = (fy*fx_n + fxi)*cb_n + cb, lane (o, i) at bits (o*N1+i)*8. Lane i of
  // tap (fy, fxi) reads element offset d = fxi*fx_stride + cb*N1 + i from the
  // pixel base, i.e. filter column d / C, channel d mod C.
  function automatic void pack_weights(ref cfg_item_t q[$], input int proc, int N1, int N2, int T,
      iarr_t w, int CO, int FY, int FX, int C, int fy_n, int fx_n, int cb_n, int groups,
      int fx_stride, int w_base);
    int kbt, nch;
    kbt = fy_n * fx_n * cb_n * T;
    nch = (N1 * N2 * 8 + 63) / 64;
    for (int g = 0; g < groups; g++) for (int fy = 0; fy < fy_n; fy++) for (int fxi = 0; fxi < fx_n; fxi++)
      for (int cb = 0; cb < cb_n; cb++) for (int t = 0; t < T; t++) begin
        logic [16*96*8-1:0] word;
        int kb, wa;
        word = '0;
        kb = (fy*fx_n + fxi)*cb_n + cb;
        wa = w_base + g*kbt + kb*T + t;
        for (int o = 0; o < N2; o++) for (int i = 0; i < N1; i++) begin
          int d, fx, ci, co;
          d  = fxi*fx_stride + cb*N1 + i;
          fx = d / C; ci = d % C; co = (g*T + t)*N2 + o;
          if (fy < FY && fx < FX && co < CO)
            word[(o*N1 + i)*8 +: 8] = 8'(w[((co*FY + fy)*FX + fx)*C + ci]);
        end
        for (int c = 0; c < nch; c++) q.push_back('{CFG_WEIGHT, proc, wa*nch + c, word[c*64 +: 64]});
      end
  endfunction

  // Bias store words: word b_base + g*T + t, lane o (32 bits) = bias[(g*T+t)*N2+o].
  function automatic void pack_bias(ref cfg_item_t q[$], input int proc, int N2, int T,
      iarr_t b, int CO, int groups, int b_base);
    int nch;
    nch = (N2 * 32 + 63) / 64;
    for (int g = 0; g < groups; g++) for (int t = 0; t < T; t++) begin
      logic [16*32-1:0] word;
      word = '0;
      for (int o = 0; o < N2; o++)
        if ((g*T + t)*N2 + o < CO) word[o*32 +: 32] = 32'(b[(g*T + t)*N2 + o]);
      for (int c = 0; c < nch; c++)
        q.push_back('{CFG_BIAS, proc, (b_base + g*T + t)*nch + c, word[c*64 +: 64]});
    end
  endfunction

  function automatic void pack_instr(ref cfg_item_t q[$], input int proc, int idx, instr_t ins);
    localparam int NCH = (INSTR_W + 63) / 64;
    logic [NCH*64-1:0] wide;
    wide = (NCH*64)'(ins);
    for (int c = 0; c < NCH; c++) q.push_back('{CFG_INSTR, proc, idx*NCH + c, wide[c*64 +: 64]});
  endfunction

  function automatic instr_t mk_conv(int wait_ev, bit dest_next, int in_base, int in_row, int in_pix,
      int fx_stride, int S, int oh, int ow, int fy_n, int fx_n, int cb_n, int groups, int w_base,
      int b_base, int out_base, int out_row, int out_pix, int sh, bit rl);
    instr_t a;
    a = '0;
    a.op = OP_CONV; a.wait_ev = 8'(wait_ev); a.dest_next = dest_next;
    a.in_base = EADDR_W'(in_base); a.in_row_stride = 16'(in_row); a.in_pix_stride = 16'(in_pix);
    a.fx_stride = 16'(fx_stride); a.conv_stride = 4'(S); a.out_h = 10'(oh); a.out_w = 10'(ow);
    a.fy_n = 4'(fy_n); a.fx_n = 4'(fx_n); a.cb_n = 8'(cb_n); a.groups = 8'(groups);
    a.w_base = 20'(w_base); a.b_base = 16'(b_base); a.out_base = EADDR_W'(out_base);
    a.out_row_stride = 16'(out_row); a.out_pix_stride = 16'(out_pix); a.shift = 6'(sh); a.relu = rl;
    return a;
  endfunction

  // ---------------------------------------------------------------------
  // The small network. Sizes: image 9x9x3; P1 7x7/2 conv 3->32 (2x2);
  // P2 1x1 conv 32->64, 2x2/1 max pool (1x1x64); P3 branch A: 1x1 64->64
  // twice, branch B: 1x1 64->64, concatenated to 128 channels; P4 fully
  // connected 128->40. T = 4 everywhere.
  // ---------------------------------------------------------------------
  localparam int IMG = 9, NLOGIT = 40;
  localparam int T4 = 4;

  class mini_net;
    iarr_t image, w1, b1, w2, b2, w3, b3, w4, b4, w5, b5, w6, b6;
    iarr_t a1, a2, a3, a4, a5, a6, cat, logits;
    cfg_item_t q[$];
    int mxv_cycles [4];

    function new();
      image = rand_arr(IMG*IMG*3, -128, 127);
      w1 = rand_arr(32*7*7*3, -20, 20);  b1 = rand_arr(32, -3000, 3000);
      w2 = rand_arr(64*32, -60, 60);     b2 = rand_arr(64, -2000, 2000);
      w3 = rand_arr(64*64, -50, 50);     b3 = rand_arr(64, -2000, 2000);
      w4 = rand_arr(64*64, -50, 50);     b4 = rand_arr(64, -2000, 2000);
      w6 = rand_arr(64*64, -50, 50);     b6 = rand_arr(64, -2000, 2000);
      w5 = rand_arr(NLOGIT*128, -100, 100); b5 = rand_arr(NLOGIT, -5000, 5000);
      a1 = conv_ref(image, IMG, IMG, 3, w1, b1, 32, 7, 7, 2, 7, 1);  // 2x2x32
      a2 = conv_ref(a1, 2, 2, 32, w2, b2, 64, 1, 1, 1, 6, 1);         // 2x2x64
      a3 = pool_ref(a2, 2, 2, 64, 2, 1);                              // 1x1x64
      a4 = conv_ref(a3, 1, 1, 64, w3, b3, 64, 1, 1, 1, 6, 1);
      a5 = conv_ref(a4, 1, 1, 64, w4, b4, 64, 1, 1, 1, 6, 1);
      a6 = conv_ref(a3, 1, 1, 64, w6, b6, 64, 1, 1, 1, 6, 1);
      cat = new[128];
      foreach (a5[i]) begin cat[i] = a5[i]; cat[64 + i] = a6[i]; end
      logits = conv_ref(cat, 1, 1, 128, w5, b5, NLOGIT, 1, 1, 1, 5, 0);
      build();
    endfunction

    function void build();
      // P1 (21 x 8): 7 filter columns x 3 channels per input vector
      pack_weights(q, 0, 21, 8, T4, w1, 32, 7, 7, 3, 7, 1, 1, 1, 3, 0);
      pack_bias(q, 0, 8, T4, b1, 32, 1, 0);
      pack_instr(q, 0, 0, mk_conv(1, 1, 0, IMG*3, 3, 3, 2, 2, 2, 7, 1, 1, 1, 0, 0,
                                  0, 2*32, 32, 7, 1));
      pack_instr(q, 0, 1, '{op: OP_HALT, default: '0});
      mxv_cycles[0] = 1 * 4 * 7 * T4;
      // P2 (32 x 16): 1x1 conv into its own buffer, then 2x2 max pool downstream
      pack_weights(q, 1, 32, 16, T4, w2, 64, 1, 1, 32, 1, 1, 1, 1, 32, 0);
      pack_bias(q, 1, 16, T4, b2, 64, 1, 0);
      pack_instr(q, 1, 0, mk_conv(1, 0, 0, 2*32, 32, 32, 1, 2, 2, 1, 1, 1, 1, 0, 0,
                                  1000, 2*64, 64, 6, 1));
      begin
        instr_t p;
        p = '0;
        p.op = OP_POOL; p.dest_next = 1; p.in_base = 1000; p.in_row_stride = 2*64;
        p.in_pix_stride = 64; p.fx_stride = 64; p.conv_stride = 1; p.out_h = 1; p.out_w = 1;
        p.fy_n = 2; p.fx_n = 2; p.cb_n = 2; p.out_base = 0; p.out_row_stride = 64; p.out_pix_stride = 64;
        pack_instr(q, 1, 1, p);
      end
      pack_instr(q, 1, 2, '{op: OP_HALT, default: '0});
      mxv_cycles[1] = 1 * 4 * 1 * T4;
      // P3 (96 x 16): branch A = two 1x1 layers through the own buffer,
      // branch B = one 1x1 layer; both land in P4's buffer side by side
      pack_weights(q, 2, 96, 16, T4, w3, 64, 1, 1, 64, 1, 1, 1, 1, 64, 0);
      pack_weights(q, 2, 96, 16, T4, w4, 64, 1, 1, 64, 1, 1, 1, 1, 64, 4);
      pack_weights(q, 2, 96, 16, T4, w6, 64, 1, 1, 64, 1, 1, 1, 1, 64, 8);
      pack_bias(q, 2, 16, T4, b3, 64, 1, 0);
      pack_bias(q, 2, 16, T4, b4, 64, 1, 4);
      pack_bias(q, 2, 16, T4, b6, 64, 1, 8);
      pack_instr(q, 2, 0, mk_conv(1, 0, 0, 64, 64, 64, 1, 1, 1, 1, 1, 1, 1, 0, 0,
                                  500, 64, 64, 6, 1));
      pack_instr(q, 2, 1, mk_conv(0, 1, 500, 64, 64, 64, 1, 1, 1, 1, 1, 1, 1, 4, 4,
                                  0, 128, 128, 6, 1));
      pack_instr(q, 2, 2, mk_conv(0, 1, 0, 64, 64, 64, 1, 1, 1, 1, 1, 1, 1, 8, 8,
                                  64, 128, 128, 6, 1));
      pack_instr(q, 2, 3, '{op: OP_HALT, default: '0});
      mxv_cycles[2] = 3 * 1 * 1 * T4;
      // P4 (8 x 1): fully connected over 128 inputs, 16 blocks, 10 groups of 4
      // logits (more results than output credits); waits for both P3 branches
      pack_weights(q, 3, 8, 1, T4, w5, NLOGIT, 1, 1, 128, 1, 1, 16, 10, 128, 0);
      pack_bias(q, 3, 1, T4, b5, NLOGIT, 10, 0);
      pack_instr(q, 3, 0, mk_conv(2, 1, 0, 128, 128, 128, 1, 1, 1, 1, 1, 16, 10, 0, 0,
                                  0, 64, 64, 5, 0));
      pack_instr(q, 3, 1, '{op: OP_HALT, default: '0});
      mxv_cycles[3] = 10 * 1 * 16 * T4;
    endfunction
  endclass
endpackage
