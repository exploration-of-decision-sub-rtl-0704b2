// lenet_pkg: types, constants and the layer table of the early-exit LeNet-5.
//
// Arithmetic follows the source design: every activation, weight and bias is
// an 8-bit signed fixed-point number with 3 integer bits (sign included) and 5
// fraction bits (Q3.5). A product of two Q3.5 values is Q6.10 and is summed in
// a wide accumulator; results are brought back to Q3.5 by an arithmetic right
// shift (truncation toward minus infinity) and saturation. The rounding and
// saturation rules are this design's choice.
//
// The network shape is this design's reading of a BranchyNet LeNet-5 with
// three convolutional and two fully connected backbone layers and a branch
// (2x2 max pooling, one convolutional and one fully connected layer) after the
// first layer. The
// first layer's output (5 x 24 x 24 = 2880 bytes) is the intermediate that the
// pipeline approach moves to memory and back.
//
// Memory layouts shared by the host and the engines:
//   feature maps : channel-major, addr = c*H*W + y*W + x, every layer at 0
//   conv weights : one KMAX*KMAX-byte word per (out ch, in ch), addr =
//                  w_base + oc*in_ch + ic; kernel tap (r,c) of a KxK kernel in
//                  byte lane r*KMAX + (KMAX-K+c)
//   fc weights   : one FC_LANES-byte word per (neuron, input chunk), addr =
//                  w_base + j*ceil(n_in/FC_LANES) + chunk; lane l holds the
//                  weight of input chunk*FC_LANES + l
//   biases       : one byte per output channel / neuron, addr = b_base + oc
package lenet_pkg;

  localparam int DW    = 8;   // data width (Q3.5)
  localparam int FRAC  = 5;   // fraction bits
  localparam int ACC_W = 24;  // accumulator width (Q.10)

  typedef logic signed [DW-1:0] fx_t;

  localparam int KMAX     = 5;   // largest kernel the convolution engine takes
  localparam int FC_LANES = 8;   // equal parts an FC input vector is split into
  localparam int NCLS     = 10;  // classes (MNIST digits)

  localparam int FM_AW = 12;     // feature-map buffer address width
  localparam int CW_AW = 9;      // conv weight memory address width
  localparam int CB_AW = 6;      // conv bias memory address width
  localparam int FW_AW = 12;     // fc weight memory address width
  localparam int FB_AW = 7;      // fc bias memory address width
  localparam int CW_W  = KMAX*KMAX*DW;  // conv weight word width
  localparam int FW_W  = FC_LANES*DW;   // fc weight word width

  typedef struct packed {
    logic [7:0]       in_ch;
    logic [7:0]       out_ch;
    logic [7:0]       in_h;
    logic [7:0]       in_w;
    logic [2:0]       k;
    logic             relu;
    logic [CW_AW-1:0] w_base;
    logic [CB_AW-1:0] b_base;
  } conv_cfg_t;

  typedef struct packed {
    logic [7:0] ch;
    logic [7:0] in_h;
    logic [7:0] in_w;
  } pool_cfg_t;

  typedef struct packed {
    logic [FM_AW-1:0] n_in;
    logic [7:0]       n_out;
    logic             relu;
    logic [FW_AW-1:0] w_base;
    logic [FB_AW-1:0] b_base;
  } fc_cfg_t;

  typedef enum logic {APPR_PIPELINE = 1'b0, APPR_PARALLEL = 1'b1} approach_e;

  // ---------------- network shape ----------------
  localparam int IMG_H = 28, IMG_W = 28;
  localparam int C1_OUT = 5,  C1_K = 5;   // 28x28x1  -> 24x24x5
  localparam int C2_OUT = 10, C2_K = 5;   // 12x12x5  -> 8x8x10
  localparam int C3_OUT = 20, C3_K = 3;   // 4x4x10   -> 2x2x20
  localparam int F1_OUT = 84;             // 80 -> 84
  // branch: pool 24x24x5 -> 12x12x5, conv 12x12x5 -> 10x10x10, fc 1000 -> 10
  localparam int BC_OUT = 10, BC_K = 3;
  localparam int BF_IN  = 10*10*10;
  localparam int F1_IN  = 2*2*20;
  localparam int SAVE_WORDS = 24*24*C1_OUT;  // 2880 bytes stored in pipeline mode

  // weight memory layout (branch layers last so that the parallel approach can
  // give them memories of their own)
  localparam int CW_C1 = 0, CW_C2 = 5, CW_C3 = 55, CW_BC = 255, CW_WORDS = 305;
  localparam int CB_C1 = 0, CB_C2 = 5, CB_C3 = 15, CB_BC = 35,  CB_WORDS = 45;
  localparam int FW_F1 = 0, FW_F2 = 840, FW_BF = 950, FW_WORDS = 2200;
  localparam int FB_F1 = 0, FB_F2 = 84,  FB_BF = 94,  FB_WORDS = 104;

  localparam int FM_WORDS = 24*24*C1_OUT;  // largest feature map (conv1 output)

  function automatic conv_cfg_t mk_conv(int ic, int oc, int h, int w, int k,
                                        int wb, int bb);
    conv_cfg_t c;
    c.in_ch  = 8'(ic);
    c.out_ch = 8'(oc);
    c.in_h   = 8'(h);
    c.in_w   = 8'(w);
    c.k      = 3'(k);
    c.relu   = 1'b1;
    c.w_base = CW_AW'(wb);
    c.b_base = CB_AW'(bb);
    return c;
  endfunction

  function automatic pool_cfg_t mk_pool(int ch, int h, int w);
    pool_cfg_t p;
    p.ch   = 8'(ch);
    p.in_h = 8'(h);
    p.in_w = 8'(w);
    return p;
  endfunction

  function automatic fc_cfg_t mk_fc(int ni, int no, bit relu, int wb, int bb);
    fc_cfg_t f;
    f.n_in   = FM_AW'(ni);
    f.n_out  = 8'(no);
    f.relu   = relu;
    f.w_base = FW_AW'(wb);
    f.b_base = FB_AW'(bb);
    return f;
  endfunction

  // Q.10 accumulator (+ Q3.5 bias) back to Q3.5 with saturation and optional ReLU
  function automatic fx_t requant(logic signed [ACC_W-1:0] acc, fx_t bias, logic relu);
    logic signed [ACC_W-1:0] s;
    logic signed [ACC_W-1:0] q;
    s = acc + (ACC_W'(bias) <<< FRAC);
    q = s >>> FRAC;
    if (relu && q < 0)   return '0;
    if (q > 127)         return 8'sd127;
    if (q < -128)        return -8'sd128;
    return fx_t'(q);
  endfunction

endpackage
