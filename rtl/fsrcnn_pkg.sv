// fsrcnn_pkg: types and constants shared by the FSRCNN super-resolution engine.
//
// Data and weights are 10-bit two's-complement fixed-point words; the position of
// the binary point is chosen per layer (dynamic quantization) and is only visible
// to the hardware as a per-layer right-shift amount.  The 10-bit word length and
// the 128-bit bus follow the published design; everything else here (the layer descriptor
// layout, the parameter-beat layout, the window size KMAX) is this design's choice.
package fsrcnn_pkg;

  localparam int unsigned DW      = 10;   // activation word length
  localparam int unsigned WW      = 10;   // weight word length
  localparam int unsigned BUS_W   = 128;  // bus width
  localparam int unsigned KMAX    = 5;    // largest convolution window (conv1, x2 sub-kernels)
  localparam int unsigned TAPS    = KMAX * KMAX;
  localparam int unsigned DK      = 9;    // deconvolution kernel size
  localparam int unsigned BEAT_WTS = BUS_W / WW;  // 12 weights per bus beat
  localparam int unsigned ACC_W   = 32;   // accumulator width

  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [WW-1:0] wgt_t;
  typedef logic signed [DW+WW-1:0] prod_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  typedef enum logic [2:0] {
    L_FEATURE = 3'd0,   // Conv(5,d,1)
    L_SHRINK  = 3'd1,   // Conv(1,s,d)
    L_MAP     = 3'd2,   // Conv(3,s,s)
    L_EXPAND  = 3'd3,   // Conv(1,d,s)
    L_DECONV  = 3'd4    // DeConv(9,1,scale), run as scale^2 sub-pixel convolutions
  } layer_kind_e;

  // One layer as the controller sees it.
  typedef struct packed {
    layer_kind_e kind;
    logic [2:0]  k;        // window size of the (sub-)kernel: 1, 3 or 5
    logic [6:0]  cin;      // input channels
    logic [6:0]  cout;     // output channels (scale^2 phases for the deconvolution)
    logic        prelu;    // PReLU applied to the output
  } layer_desc_t;

  // PReLU slope as a sum of up to two negative powers of two.
  typedef struct packed {
    logic       e1;
    logic [3:0] p1;
    logic       e2;
    logic [3:0] p2;
  } slope_t;

  // Per-output-channel parameters carried in a parameter beat.
  typedef struct packed {
    data_t  bias;
    slope_t slope;
  } chan_param_t;   // 20 bits

  localparam int unsigned CHP_W = $bits(chan_param_t);
  // Parameter beat: [5:0] rescale shift, then one 24-bit field per lane from bit 8.
  localparam int unsigned PB_LANE_OFS = 8;
  localparam int unsigned PB_LANE_W   = 24;

  // Kernel size of the sub-pixel kernels for an upscaling factor: ceil(9/scale).
  function automatic logic [2:0] deconv_k(input logic [2:0] scale);
    return 3'((DK + int'(scale) - 1) / int'(scale));
  endfunction

endpackage
