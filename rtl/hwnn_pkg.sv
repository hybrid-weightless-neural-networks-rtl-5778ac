// hwnn_pkg: types, constants and helper functions shared by the H-WNN
// (hybrid weightless neural network) accelerator.
//
// The network is a CNV-6 style quantized CNN front end (3x3 convolutions and
// 2x2 max-pooling, 64 then 128 channels) whose later layers are replaced by a
// differentiable weightless network (DWN): thermometer encoding, two layers of
// 6-input lookup tables, a per-class popcount and an argmax.
//
// Trained parameters (convolution weights, thresholds, LUT contents) are not
// fixed in the RTL: they are written after reset through one configuration
// bus (cfg_t). Each memory answers to its own target code; the address layout
// of each target is described where the memory is declared.
//
// Activation encoding used throughout: an activation of ABITS bits is an
// unsigned integer; when ABITS is 1 the bit is bipolar (0 -> -1, 1 -> +1),
// as in binarized networks. Weights of WBITS bits are two's complement
// integers, and bipolar when WBITS is 1.
package hwnn_pkg;

  // Configuration bus
  localparam int unsigned CFG_AW = 20;
  localparam int unsigned CFG_DW = 32;

  typedef enum logic [3:0] {
    CFG_W_CONV1 = 4'd0,
    CFG_W_CONV2 = 4'd1,
    CFG_W_CONV3 = 4'd2,
    CFG_W_CONV4 = 4'd3,
    CFG_T_CONV1 = 4'd4,
    CFG_T_CONV2 = 4'd5,
    CFG_T_CONV3 = 4'd6,
    CFG_T_CONV4 = 4'd7,
    CFG_LUT1    = 4'd8,
    CFG_LUT2    = 4'd9
  } cfg_target_e;

  typedef struct packed {
    logic                valid;
    cfg_target_e         target;
    logic [CFG_AW-1:0]   addr;
    logic [CFG_DW-1:0]   data;
  } cfg_t;

  // CNV-6 front end kept in hardware (Conv1, Conv2, MP1, Conv3, Conv4, MP2)
  localparam int unsigned IMG_DIM  = 32;   // input image is 32x32
  localparam int unsigned IMG_CH   = 3;    // RGB
  localparam int unsigned IMG_BITS = 8;    // 8-bit pixels
  localparam int unsigned CONV_K   = 3;    // 3x3 kernels
  localparam int unsigned STAGE1_CH = 64;
  localparam int unsigned STAGE2_CH = 128;

  // DWN defaults
  localparam int unsigned LUT_K    = 6;    // native 6-input FPGA LUT
  localparam int unsigned NUM_CLASSES = 10;

  // Number of thresholds (and thermometer bits) for an ABITS-bit activation
  function automatic int unsigned num_thresh(int unsigned abits);
    return (1 << abits) - 1;
  endfunction

  // Fixed LUT input wiring of a DWN layer: input k of LUT l is wired to
  // input bit ((l*LUT_K + k) * mult + offset) mod n_in. With mult coprime
  // to n_in the LUT_K inputs of one LUT are distinct whenever n_in >= LUT_K.
  function automatic int unsigned lut_map(int unsigned l, int unsigned k,
                                          int unsigned lut_k, int unsigned mult,
                                          int unsigned offset, int unsigned n_in);
    longint unsigned j;
    j = (longint'(l) * longint'(lut_k) + longint'(k)) * longint'(mult) + longint'(offset);
    return int'(j % longint'(n_in));
  endfunction

  // Smallest width that holds values 0..n
  function automatic int unsigned cnt_w(int unsigned n);
    return (n < 2) ? 1 : $clog2(n + 1);
  endfunction

endpackage
