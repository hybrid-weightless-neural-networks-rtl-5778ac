// hwnn_top: hybrid weightless neural network (H-WNN) inference engine.
//
// A CNV-6 style quantized CNN front end extracts spatial features and a
// differentiable weightless network (DWN) of lookup tables replaces the
// remaining convolution and fully connected layers:
//
//   image 32x32x3 (8-bit) -> Conv1 3x3, 64 ch  -> 30x30x64
//                         -> Conv2 3x3, 64 ch  -> 28x28x64 -> MaxPool -> 14x14x64
//                         -> Conv3 3x3, 128 ch -> 12x12x128
//                         -> Conv4 3x3, 128 ch -> 10x10x128 -> MaxPool -> 5x5x128
//                         -> flatten (3200 activations) -> thermometer encoding
//                         -> LUT layer 1 (N_LUT1 x LUT6) -> LUT layer 2 (N_LUT2 x LUT6)
//                         -> per-class popcount -> argmax -> class
//
// The replacement point (everything from Conv5 on is replaced), the layer
// shapes and the 6-input LUTs follow the H-WNN architecture; no padding,
// stride-1 convolutions, the fold factor PE, the DWN table counts and the
// configuration bus are this design's choices.
//
// Interface:
//   cfg_*     configuration bus, one 32-bit word per cycle, used after reset
//             and before images are sent (targets and addresses in hwnn_pkg,
//             mvtu and lut_layer).
//   in_*      pixel stream, row-major, {B,G,R} 8-bit each (channel c at
//             bits 8c+7:8c), valid/ready.
//   out_*     one result per image: class index, its score and all scores,
//             valid for one cycle (no backpressure).
// Timing: the layers form a dataflow pipeline; with PE = 1 Conv1 needs 64
// cycles per output pixel and bounds the rate at about 57,600 cycles per
// image, and successive images overlap in the pipeline.
module hwnn_top
  import hwnn_pkg::*;
#(
  parameter int unsigned WBITS   = 1,
  parameter int unsigned ABITS   = 1,
  parameter int unsigned PE      = 1,
  parameter int unsigned N_LUT1  = 2000,
  parameter int unsigned N_LUT2  = 1000,
  parameter int unsigned SW      = cnt_w(N_LUT2 / NUM_CLASSES),
  parameter int unsigned CB      = $clog2(NUM_CLASSES)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             cfg_valid,
  input  logic [3:0]                       cfg_target,
  input  logic [CFG_AW-1:0]                cfg_addr,
  input  logic [CFG_DW-1:0]                cfg_data,
  input  logic                             in_valid,
  output logic                             in_ready,
  input  logic [IMG_CH*IMG_BITS-1:0]       in_data,
  output logic                             out_valid,
  output logic [CB-1:0]                    out_class,
  output logic [SW-1:0]                    out_max,
  output logic [NUM_CLASSES-1:0][SW-1:0]   out_scores
);
  localparam bit          BIP  = (ABITS == 1);
  localparam int unsigned D1   = IMG_DIM;        // 32
  localparam int unsigned D2   = D1 - CONV_K + 1; // 30
  localparam int unsigned D3   = D2 - CONV_K + 1; // 28
  localparam int unsigned D4   = D3 / 2;          // 14
  localparam int unsigned D5   = D4 - CONV_K + 1; // 12
  localparam int unsigned D6   = D5 - CONV_K + 1; // 10
  localparam int unsigned D7   = D6 / 2;          // 5
  localparam int unsigned C1   = STAGE1_CH;
  localparam int unsigned C2   = STAGE2_CH;

  cfg_t cfg;
  always_comb begin
    cfg.valid  = cfg_valid;
    cfg.target = cfg_target_e'(cfg_target);
    cfg.addr   = cfg_addr;
    cfg.data   = cfg_data;
  end

  logic v1, r1, v2, r2, v3, r3, v4, r4, v5, r5, v6, r6, v7, r7;
  logic [C1*ABITS-1:0]       d1, d2, d3;
  logic [C2*ABITS-1:0]       d4, d5, d6;
  logic [D7*D7*C2*ABITS-1:0] d7;

  conv_layer #(.DIM(D1), .CH(IMG_CH), .IN_BITS(IMG_BITS), .IN_BIPOLAR(1'b0),
               .OUT_CH(C1), .K(CONV_K), .WBITS(WBITS), .ABITS(ABITS), .PE(PE),
               .W_TARGET(CFG_W_CONV1), .T_TARGET(CFG_T_CONV1)) u_conv1 (
    .clk, .rst_n, .cfg, .in_valid, .in_ready, .in_data,
    .out_valid(v1), .out_ready(r1), .out_data(d1));

  conv_layer #(.DIM(D2), .CH(C1), .IN_BITS(ABITS), .IN_BIPOLAR(BIP),
               .OUT_CH(C1), .K(CONV_K), .WBITS(WBITS), .ABITS(ABITS), .PE(PE),
               .W_TARGET(CFG_W_CONV2), .T_TARGET(CFG_T_CONV2)) u_conv2 (
    .clk, .rst_n, .cfg, .in_valid(v1), .in_ready(r1), .in_data(d1),
    .out_valid(v2), .out_ready(r2), .out_data(d2));

  maxpool #(.DIM(D3), .CH(C1), .B(ABITS)) u_mp1 (
    .clk, .rst_n, .in_valid(v2), .in_ready(r2), .in_data(d2),
    .out_valid(v3), .out_ready(r3), .out_data(d3));

  conv_layer #(.DIM(D4), .CH(C1), .IN_BITS(ABITS), .IN_BIPOLAR(BIP),
               .OUT_CH(C2), .K(CONV_K), .WBITS(WBITS), .ABITS(ABITS), .PE(PE),
               .W_TARGET(CFG_W_CONV3), .T_TARGET(CFG_T_CONV3)) u_conv3 (
    .clk, .rst_n, .cfg, .in_valid(v3), .in_ready(r3), .in_data(d3),
    .out_valid(v4), .out_ready(r4), .out_data(d4));

  conv_layer #(.DIM(D5), .CH(C2), .IN_BITS(ABITS), .IN_BIPOLAR(BIP),
               .OUT_CH(C2), .K(CONV_K), .WBITS(WBITS), .ABITS(ABITS), .PE(PE),
               .W_TARGET(CFG_W_CONV4), .T_TARGET(CFG_T_CONV4)) u_conv4 (
    .clk, .rst_n, .cfg, .in_valid(v4), .in_ready(r4), .in_data(d4),
    .out_valid(v5), .out_ready(r5), .out_data(d5));

  maxpool #(.DIM(D6), .CH(C2), .B(ABITS)) u_mp2 (
    .clk, .rst_n, .in_valid(v5), .in_ready(r5), .in_data(d5),
    .out_valid(v6), .out_ready(r6), .out_data(d6));

  flatten #(.N_PIX(D7*D7), .PIX_W(C2*ABITS)) u_flat (
    .clk, .rst_n, .in_valid(v6), .in_ready(r6), .in_data(d6),
    .out_valid(v7), .out_ready(r7), .out_data(d7));

  dwn #(.N_ACT(D7*D7*C2), .ABITS(ABITS), .N_LUT1(N_LUT1), .N_LUT2(N_LUT2),
        .CLASSES(NUM_CLASSES), .SW(SW), .CB(CB)) u_dwn (
    .clk, .rst_n, .cfg, .in_valid(v7), .in_ready(r7), .in_data(d7),
    .out_valid, .out_class, .out_max, .out_scores);

endmodule
