// cnn_pkg: types, widths and the layer schedule shared by the CNN processor.
//
// The network is the small handwritten-digit CNN of the design: six 3x3
// convolutions without bias, ReLU after each, two 2x2 max-pool layers, one
// global max-pool layer and one dense layer (16 inputs, 11 outputs) that is run
// as a 1x1 convolution on the same convolution engine. The shapes and the
// parameter count (4676 weights) are those of the network description; the
// fixed-point widths, the memory layout and the order of the schedule are this
// design's own choices.
//
// Memory layouts (own choice):
//   feature map   : address = (channel * H + y) * W + x, one unsigned byte each
//   weight memory : one word per (layer, group of 8 output channels, input
//                   channel, kernel tap); lane l of the word (bits 8l+7:8l) is
//                   the signed weight of output channel 8*group + l.
//                   address = wbase + (group * CIN + cin) * K*K + tap,
//                   tap = ky * K + kx.
package cnn_pkg;

  // Number of convolution kernels (output channels) computed in parallel.
  localparam int unsigned PAR   = 8;
  localparam int unsigned ACT_W = 8;    // unsigned activation after ReLU
  localparam int unsigned WGT_W = 8;    // signed fixed-point weight
  localparam int unsigned ACC_W = 32;   // accumulator
  localparam int unsigned NUM_CLASSES = 11;

  // Input image and the largest feature map (28 x 28 x 4).
  localparam int unsigned IMG_H = 28;
  localparam int unsigned IMG_W = 28;
  localparam int unsigned FM_DEPTH = 28 * 28 * 4;
  localparam int unsigned FM_AW    = $clog2(FM_DEPTH);

  // Weight words: sum over conv/dense layers of groups * CIN * K*K.
  localparam int unsigned W_DEPTH = 617;
  localparam int unsigned W_AW    = $clog2(W_DEPTH);
  localparam int unsigned W_WORD  = PAR * WGT_W;

  localparam int unsigned NUM_LAYERS = 10;

  typedef logic [ACT_W-1:0]        act_t;
  typedef logic signed [WGT_W-1:0] wgt_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  typedef enum logic {L_CONV = 1'b0, L_POOL = 1'b1} layer_kind_e;

  // One step of the schedule. For L_CONV, ksize is the kernel size (3 or 1);
  // for L_POOL it is the pooling window and stride (2, or 7 for global pooling).
  typedef struct packed {
    layer_kind_e       kind;
    logic [3:0]        ksize;
    logic [5:0]        in_h;
    logic [5:0]        in_w;
    logic [5:0]        cin;
    logic [5:0]        cout;
    logic [W_AW-1:0]   wbase;
    logic              relu;
    logic              final_layer;  // scores go to the classifier
    logic              src_b;        // 0: read buffer A, write B; 1: the reverse
  } layer_cfg_t;

  function automatic layer_cfg_t mk_layer(layer_kind_e kind, int k, int h, int w,
                                          int ci, int co, int wb, bit relu,
                                          bit fin, bit src_b);
    layer_cfg_t c;
    c.kind        = kind;
    c.ksize       = 4'(k);
    c.in_h        = 6'(h);
    c.in_w        = 6'(w);
    c.cin         = 6'(ci);
    c.cout        = 6'(co);
    c.wbase       = W_AW'(wb);
    c.relu        = relu;
    c.final_layer = fin;
    c.src_b       = src_b;
    return c;
  endfunction

  // The schedule of the network, in execution order.
  function automatic layer_cfg_t layer_table(int unsigned i);
    case (i)
      0: return mk_layer(L_CONV, 3, 28, 28,  1,  4,   0, 1'b1, 1'b0, 1'b0); // conv1
      1: return mk_layer(L_CONV, 3, 28, 28,  4,  4,   9, 1'b1, 1'b0, 1'b1); // conv2
      2: return mk_layer(L_POOL, 2, 28, 28,  4,  4,   0, 1'b0, 1'b0, 1'b0); // pool1
      3: return mk_layer(L_CONV, 3, 14, 14,  4,  8,  45, 1'b1, 1'b0, 1'b1); // conv3
      4: return mk_layer(L_CONV, 3, 14, 14,  8,  8,  81, 1'b1, 1'b0, 1'b0); // conv4
      5: return mk_layer(L_POOL, 2, 14, 14,  8,  8,   0, 1'b0, 1'b0, 1'b1); // pool2
      6: return mk_layer(L_CONV, 3,  7,  7,  8, 16, 153, 1'b1, 1'b0, 1'b0); // conv5
      7: return mk_layer(L_CONV, 3,  7,  7, 16, 16, 297, 1'b1, 1'b0, 1'b1); // conv6
      8: return mk_layer(L_POOL, 7,  7,  7, 16, 16,   0, 1'b0, 1'b0, 1'b0); // global max pool
      default:
         return mk_layer(L_CONV, 1,  1,  1, 16, 11, 585, 1'b0, 1'b1, 1'b1); // dense
    endcase
  endfunction

  // Requantise an accumulator to an unsigned activation: arithmetic shift
  // right by qshift, then clamp to 0..255. The clamp at zero is the ReLU; for
  // the dense layer (no ReLU) it only affects the byte kept in the buffer, the
  // classifier sees the raw accumulator.
  function automatic act_t requant(acc_t acc, int unsigned qshift);
    acc_t s;
    s = acc >>> qshift;
    if (s < 0) return '0;
    if (s > acc_t'(2**ACT_W - 1)) return '1;
    return act_t'(s);
  endfunction

endpackage
