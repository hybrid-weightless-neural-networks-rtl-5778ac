// conv_layer: one quantized 3x3 convolution layer of the CNV-6 front end,
// built as a streaming dataflow stage.
//
// A sliding window unit (swu) turns the row-major pixel stream into KxK
// windows (stride 1, no padding, so a DIM x DIM map gives (DIM-K+1)^2 output
// pixels), and a matrix-vector-threshold unit (mvtu) computes all OUT_CH
// output activations of each window, PE channels per cycle.
//
// Interface: pixel stream in (CH activations of IN_BITS bits), pixel stream
// out (OUT_CH activations of ABITS bits), both valid/ready; configuration bus
// for weights (W_TARGET) and thresholds (T_TARGET), see mvtu.
// Timing: one output pixel every OUT_CH/PE cycles once the first K-1 rows
// and K-1 pixels have arrived.
//
// Layer sizes (3x3, 64/128 channels) follow the CNV-6 network; the
// streaming structure, the no-padding convention and the fold factor are
// this design's choices.
module conv_layer
  import hwnn_pkg::*;
#(
  parameter int unsigned DIM        = IMG_DIM,
  parameter int unsigned CH         = IMG_CH,
  parameter int unsigned IN_BITS    = IMG_BITS,
  parameter bit          IN_BIPOLAR = 1'b0,
  parameter int unsigned OUT_CH     = STAGE1_CH,
  parameter int unsigned K          = CONV_K,
  parameter int unsigned WBITS      = 1,
  parameter int unsigned ABITS      = 1,
  parameter int unsigned PE         = 1,
  parameter cfg_target_e W_TARGET   = CFG_W_CONV1,
  parameter cfg_target_e T_TARGET   = CFG_T_CONV1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  cfg_t                     cfg,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [CH*IN_BITS-1:0]    in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [OUT_CH*ABITS-1:0]  out_data
);
  localparam int unsigned N = K * K * CH;

  logic                 win_valid, win_ready;
  logic [N*IN_BITS-1:0] win_data;

  swu #(.DIM(DIM), .CH(CH), .B(IN_BITS), .K(K)) u_swu (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid(win_valid), .out_ready(win_ready), .out_data(win_data)
  );

  mvtu #(
    .N(N), .IN_BITS(IN_BITS), .IN_BIPOLAR(IN_BIPOLAR), .OUT_CH(OUT_CH),
    .WBITS(WBITS), .ABITS(ABITS), .PE(PE),
    .W_TARGET(W_TARGET), .T_TARGET(T_TARGET)
  ) u_mvtu (
    .clk, .rst_n, .cfg,
    .in_valid(win_valid), .in_ready(win_ready), .in_data(win_data),
    .out_valid, .out_ready, .out_data
  );

endmodule
