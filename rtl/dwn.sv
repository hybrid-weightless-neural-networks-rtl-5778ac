// dwn: weightless classifier that replaces the later CNN layers.
//
// The flattened activation vector (N_ACT activations of ABITS bits) is
// thermometer-encoded into N_ACT*(2^ABITS-1) bits, passed through two layers
// of 6-input lookup tables (N_LUT1 then N_LUT2 tables), the outputs of the
// second layer are counted per class (N_LUT2/CLASSES tables per class) and
// the class with the highest count is reported.
//
// Timing: fully pipelined, one vector per cycle (in_ready is always 1);
// the winning class, its score and all class scores appear 4 cycles after the vector (LUT layer 1, LUT layer 2,
// popcount and argmax are each registered). The chain of stages follows the
// H-WNN architecture; the number of LUT layers, the table counts and the
// wiring multipliers are this design's choices.
module dwn
  import hwnn_pkg::*;
#(
  parameter int unsigned N_ACT   = 3200,
  parameter int unsigned ABITS   = 1,
  parameter int unsigned N_LUT1  = 2000,
  parameter int unsigned N_LUT2  = 1000,
  parameter int unsigned CLASSES = NUM_CLASSES,
  parameter int unsigned MULT1   = 7919,
  parameter int unsigned MULT2   = 7907,
  parameter int unsigned SW      = cnt_w(N_LUT2 / CLASSES),
  parameter int unsigned CB      = (CLASSES < 2) ? 1 : $clog2(CLASSES)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  cfg_t                          cfg,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [N_ACT*ABITS-1:0]        in_data,
  output logic                          out_valid,
  output logic [CB-1:0]                 out_class,
  output logic [SW-1:0]                 out_max,
  output logic [CLASSES-1:0][SW-1:0]    out_scores
);
  localparam int unsigned NBITS = N_ACT * num_thresh(ABITS);

  logic [NBITS-1:0]             therm;
  logic                         v1, v2, vp;
  logic [N_LUT1-1:0]            l1;
  logic [N_LUT2-1:0]            l2;
  logic [CLASSES-1:0][SW-1:0]   scores;

  assign in_ready = 1'b1;

  thermo_enc #(.N(N_ACT), .B(ABITS)) u_therm (.in_data, .out_bits(therm));

  lut_layer #(.N_IN(NBITS), .N_LUT(N_LUT1), .K(LUT_K), .MAP_MULT(MULT1),
              .MAP_OFF(0), .TARGET(CFG_LUT1)) u_l1 (
    .clk, .rst_n, .cfg, .in_valid, .in_bits(therm), .out_valid(v1), .out_bits(l1)
  );

  lut_layer #(.N_IN(N_LUT1), .N_LUT(N_LUT2), .K(LUT_K), .MAP_MULT(MULT2),
              .MAP_OFF(1), .TARGET(CFG_LUT2)) u_l2 (
    .clk, .rst_n, .cfg, .in_valid(v1), .in_bits(l1), .out_valid(v2), .out_bits(l2)
  );

  popcount #(.N_IN(N_LUT2), .CLASSES(CLASSES), .SW(SW)) u_pop (
    .clk, .rst_n, .in_valid(v2), .in_bits(l2), .out_valid(vp), .out_scores(scores)
  );

  argmax #(.CLASSES(CLASSES), .SW(SW), .CB(CB)) u_arg (
    .clk, .rst_n, .in_valid(vp), .in_scores(scores),
    .out_valid, .out_class, .out_max, .out_scores
  );

endmodule
