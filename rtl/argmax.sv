// argmax: picks the class with the highest score.
//
// Compares the CLASSES scores as unsigned integers; on a tie the lowest
// class index wins (the tie rule is this design's choice). Class, its score
// and the score vector are registered: out_valid follows in_valid by one
// cycle, one decision per cycle.
module argmax
  import hwnn_pkg::*;
#(
  parameter int unsigned CLASSES = NUM_CLASSES,
  parameter int unsigned SW      = 7,
  parameter int unsigned CB      = (CLASSES < 2) ? 1 : $clog2(CLASSES)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [CLASSES-1:0][SW-1:0]    in_scores,
  output logic                          out_valid,
  output logic [CB-1:0]                 out_class,
  output logic [SW-1:0]                 out_max,
  output logic [CLASSES-1:0][SW-1:0]    out_scores
);
  logic [CB-1:0] best;
  logic [SW-1:0] best_score;

  always_comb begin
    best       = '0;
    best_score = in_scores[0];
    for (int unsigned c = 1; c < CLASSES; c++) begin
      if (in_scores[c] > best_score) begin
        best       = CB'(c);
        best_score = in_scores[c];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_class  <= '0;
      out_max    <= '0;
      out_scores <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_class  <= best;
        out_max    <= best_score;
        out_scores <= in_scores;
      end
    end
  end

endmodule
