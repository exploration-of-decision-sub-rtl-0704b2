// lenet_ref_pkg: golden model of the early-exit LeNet-5 for the testbenches.
//
// Plain integer arithmetic, one output value at a time, written straight from
// the layer definitions (no windows, chunks or pipelines). It holds the
// weight/bias images that the testbenches also load into the hardware, using
// the memory layouts documented in lenet_pkg, and random generators for
// weights and images. Values are Q3.5 integers in -128..127.
package lenet_ref_pkg;
  import lenet_pkg::*;

  typedef int iarr_t[];

  logic [CW_W-1:0] cw_img [CW_WORDS];
  int              cb_img [CB_WORDS];
  logic [FW_W-1:0] fw_img [FW_WORDS];
  int              fb_img [FB_WORDS];

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  // Uniform weights of range +-32*sqrt(6/fan_in) (He scaling in Q3.5), so
  // that activations neither die nor saturate through the layers. Conv words
  // use only the kxk taps; the other lanes get random junk so that a design
  // that reads them is caught.
  function automatic int wlim(int fan_in);
    return int'(32.0 * $sqrt(6.0 / real'(fan_in)) + 0.5);
  endfunction

  function automatic void gen_weights(int bmax);
    for (int a = 0; a < CW_WORDS; a++) begin
      int lim = (a < CW_C2) ? wlim(25) : (a < CW_C3) ? wlim(125) : (a < CW_BC) ? wlim(90) : wlim(45);
      for (int l = 0; l < KMAX*KMAX; l++) cw_img[a][l*8 +: 8] = 8'(rnd(-lim, lim));
    end
    for (int a = 0; a < CB_WORDS; a++) cb_img[a] = rnd(-bmax, bmax);
    for (int a = 0; a < FW_WORDS; a++) begin
      int lim = (a < FW_F2) ? wlim(F1_IN) : (a < FW_BF) ? wlim(F1_OUT) : wlim(BF_IN);
      for (int l = 0; l < FC_LANES; l++) fw_img[a][l*8 +: 8] = 8'(rnd(-lim, lim));
    end
    for (int a = 0; a < FB_WORDS; a++) fb_img[a] = rnd(-bmax, bmax);
  endfunction

  function automatic int sbyte(logic [7:0] b);
    return int'($signed(b));
  endfunction

  // Q.10 sum + Q3.5 bias -> Q3.5, floor division by 32, ReLU, saturation
  function automatic int rq(longint acc, int bias, bit relu);
    longint s, q;
    s = acc + longint'(bias) * 32;
    q = (s >= 0) ? s / 32 : -((-s + 31) / 32);
    if (relu && q < 0) q = 0;
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return int'(q);
  endfunction

  function automatic int conv_w(int wb, int o, int c, int ic, int k, int kr, int kc);
    return sbyte(cw_img[wb + o*ic + c][(kr*KMAX + (KMAX - k + kc))*8 +: 8]);
  endfunction

  function automatic iarr_t conv(iarr_t x, int ic, int h, int w, int oc, int k,
                                 int wb, int bb, bit relu);
    int oh = h - k + 1, ow = w - k + 1;
    iarr_t y = new[oc*oh*ow];
    for (int o = 0; o < oc; o++)
      for (int yy = 0; yy < oh; yy++)
        for (int xx = 0; xx < ow; xx++) begin
          longint acc = 0;
          for (int c = 0; c < ic; c++)
            for (int kr = 0; kr < k; kr++)
              for (int kc = 0; kc < k; kc++)
                acc += longint'(x[c*h*w + (yy+kr)*w + xx + kc]) * conv_w(wb, o, c, ic, k, kr, kc);
          y[o*oh*ow + yy*ow + xx] = rq(acc, cb_img[bb + o], relu);
        end
    return y;
  endfunction

  function automatic iarr_t pool(iarr_t x, int ch, int h, int w);
    int oh = h / 2, ow = w / 2;
    iarr_t y = new[ch*oh*ow];
    for (int c = 0; c < ch; c++)
      for (int yy = 0; yy < oh; yy++)
        for (int xx = 0; xx < ow; xx++) begin
          int m = -1000;
          for (int dy = 0; dy < 2; dy++)
            for (int dx = 0; dx < 2; dx++)
              if (x[c*h*w + (2*yy+dy)*w + 2*xx+dx] > m) m = x[c*h*w + (2*yy+dy)*w + 2*xx+dx];
          y[c*oh*ow + yy*ow + xx] = m;
        end
    return y;
  endfunction

  function automatic iarr_t fc(iarr_t x, int nin, int nout, int wb, int bb, bit relu);
    int nch = (nin + FC_LANES - 1) / FC_LANES;
    iarr_t y = new[nout];
    for (int j = 0; j < nout; j++) begin
      longint acc = 0;
      for (int i = 0; i < nin; i++)
        acc += longint'(x[i]) * sbyte(fw_img[wb + j*nch + i/FC_LANES][(i%FC_LANES)*8 +: 8]);
      y[j] = rq(acc, fb_img[bb + j], relu);
    end
    return y;
  endfunction

  // exit rule: largest softmax probability >= thr/256. conf is the sum of
  // exp(z_i - zmax) in units of 2^-15, computed as 2^(-x) with x = d*369/8192
  // rounded to the nearest sixteenth, 2^(-f/16) rounded to 15 fraction bits.
  function automatic void smax(iarr_t z, int thr, output int cls, output bit ex, output int conf);
    int zm = z[0];
    cls = 0;
    for (int i = 1; i < NCLS; i++) if (z[i] > zm) begin zm = z[i]; cls = i; end
    conf = 0;
    for (int i = 0; i < NCLS; i++) begin
      int t = (zm - z[i]) * 369 + 256;
      int f = (t / 512) % 16;
      int n = t / 8192;
      int base = int'($floor((2.0 ** (-real'(f) / 16.0)) * 32768.0 + 0.5));
      conf += (n >= 16) ? 0 : (base >> n);
    end
    ex = (longint'(thr) * conf) <= 64'd8388608;
  endfunction

  // whole network: branch logits and decision, and the final class
  function automatic void network(iarr_t img, int thr, output int br_cls, output bit br_exit,
                                  output int fin_cls);
    iarr_t a1, b1, b2, b3, p1, c2, p2, c3, f1, f2;
    int conf;
    bit dummy;
    a1 = conv(img, 1, 28, 28, C1_OUT, C1_K, CW_C1, CB_C1, 1);
    b1 = pool(a1, C1_OUT, 24, 24);
    b2 = conv(b1, C1_OUT, 12, 12, BC_OUT, BC_K, CW_BC, CB_BC, 1);
    b3 = fc(b2, BF_IN, NCLS, FW_BF, FB_BF, 0);
    smax(b3, thr, br_cls, br_exit, conf);
    p1 = pool(a1, C1_OUT, 24, 24);
    c2 = conv(p1, C1_OUT, 12, 12, C2_OUT, C2_K, CW_C2, CB_C2, 1);
    p2 = pool(c2, C2_OUT, 8, 8);
    c3 = conv(p2, C2_OUT, 4, 4, C3_OUT, C3_K, CW_C3, CB_C3, 1);
    f1 = fc(c3, F1_IN, F1_OUT, FW_F1, FB_F1, 1);
    f2 = fc(f1, F1_OUT, NCLS, FW_F2, FB_F2, 0);
    smax(f2, 0, fin_cls, dummy, conf);
  endfunction

  // the branch's confidence sum, to pick thresholds on either side of it
  function automatic int branch_conf(iarr_t img);
    iarr_t a1, b1, b2, b3;
    int cls, conf;
    bit ex;
    a1 = conv(img, 1, 28, 28, C1_OUT, C1_K, CW_C1, CB_C1, 1);
    b1 = pool(a1, C1_OUT, 24, 24);
    b2 = conv(b1, C1_OUT, 12, 12, BC_OUT, BC_K, CW_BC, CB_BC, 1);
    b3 = fc(b2, BF_IN, NCLS, FW_BF, FB_BF, 0);
    smax(b3, 0, cls, ex, conf);
    return conf;
  endfunction

  // ---- expected run times (cycles from start to done) ----
  // engine latencies as documented in the engines' headers
  function automatic int lat_conv(int ic, int h, int w, int oc, int k);
    return oc*(h-k+1)*(ic*(w*k+5) + (w-k+1)) + 1;
  endfunction
  function automatic int lat_pool(int c, int h, int w);
    return 4*c*(h/2)*(w/2) + 2;
  endfunction
  function automatic int lat_fc(int ni, int no);
    return ((ni + FC_LANES - 1) / FC_LANES) * (FC_LANES + no + 2) + no + 2;
  endfunction
  localparam int LAT_SMAX = 2*NCLS + 4;
  localparam int LAT_MOVE = SAVE_WORDS + 2;

  // every step of a sequencer adds one launch cycle
  function automatic int lat_branch();
    return (lat_pool(C1_OUT, 24, 24) + 1) + (lat_conv(C1_OUT, 12, 12, BC_OUT, BC_K) + 1)
         + (lat_fc(BF_IN, NCLS) + 1) + (LAT_SMAX + 1);
  endfunction
  function automatic int lat_backbone_rest();
    return (lat_pool(C1_OUT, 24, 24) + 1) + (lat_conv(C1_OUT, 12, 12, C2_OUT, C2_K) + 1)
         + (lat_pool(C2_OUT, 8, 8) + 1) + (lat_conv(C2_OUT, 4, 4, C3_OUT, C3_K) + 1)
         + (lat_fc(F1_IN, F1_OUT) + 1) + (lat_fc(F1_OUT, NCLS) + 1) + (LAT_SMAX + 1);
  endfunction
  function automatic int lat_conv1();
    return lat_conv(1, 28, 28, C1_OUT, C1_K) + 1;
  endfunction

  // pipeline: conv1, store, branch, [load, rest of the backbone]
  function automatic int pipe_cycles(bit ex);
    return lat_conv1() + (LAT_MOVE + 1) + lat_branch()
         + (ex ? 0 : (LAT_MOVE + 1) + lat_backbone_rest());
  endfunction
  // parallel: conv1, then branch and backbone side by side; without an exit
  // the later of the two plus one cycle to combine them
  function automatic int par_cycles(bit ex);
    int rest = lat_backbone_rest();
    int br   = lat_branch();
    return lat_conv1() + (ex ? br : ((rest > br ? rest : br) + 1));
  endfunction

  function automatic iarr_t gen_image();
    iarr_t img = new[IMG_H*IMG_W];
    for (int i = 0; i < IMG_H*IMG_W; i++) img[i] = rnd(0, 32);
    return img;
  endfunction
endpackage
