// popcount: class scores of the weightless classifier.
//
// The N_IN outputs of the last LUT layer are split into CLASSES equal groups
// (group c is bits c*G .. c*G+G-1, G = N_IN/CLASSES); the score of class c is
// the number of ones in its group. Scores are registered: out_valid follows
// in_valid by one cycle and a new vector can enter every cycle. The grouping
// by contiguous ranges is this design's choice.
module popcount
  import hwnn_pkg::*;
#(
  parameter int unsigned N_IN    = 1000,
  parameter int unsigned CLASSES = NUM_CLASSES,
  parameter int unsigned SW      = cnt_w(N_IN / CLASSES)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [N_IN-1:0]               in_bits,
  output logic                          out_valid,
  output logic [CLASSES-1:0][SW-1:0]    out_scores
);
  localparam int unsigned G = N_IN / CLASSES;

  logic [CLASSES-1:0][SW-1:0] sums;

  always_comb begin
    for (int unsigned c = 0; c < CLASSES; c++) begin
      sums[c] = '0;
      for (int unsigned i = 0; i < G; i++)
        sums[c] += SW'(in_bits[c*G + i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_scores <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_scores <= sums;
    end
  end

endmodule
