// tb_argmax: self-checking test of the class selector.
//
// Random score vectors of 10 classes (drawn from a small range so that ties
// are frequent) enter on successive cycles; the reported class must be the
// first index holding the largest score, with that score and the score
// vector, one cycle after the input. Ties are counted and must occur.
module tb_argmax;
  localparam int unsigned CL = 10, SW = 7, CB = 4, VECS = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic [CL-1:0][SW-1:0] in_scores, out_scores, prev;
  logic [CB-1:0] out_class;
  logic [SW-1:0] out_max;
  logic prev_v = 0;

  argmax #(.CLASSES(CL), .SW(SW), .CB(CB)) dut (.*);

  int checks = 0, failures = 0, ties = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != prev_v) begin failures++; $display("valid timing wrong"); end
      if (prev_v && out_valid) begin
        int best, n_best;
        best = 0; n_best = 0;
        for (int c = 1; c < CL; c++) if (prev[c] > prev[best]) best = c;
        for (int c = 0; c < CL; c++) if (prev[c] == prev[best]) n_best++;
        if (n_best > 1) ties++;
        checks++;
        if (out_class != CB'(best) || out_max != prev[best] || out_scores != prev) begin
          failures++;
          $display("got class %0d (%0d) exp %0d (%0d)", out_class, out_max, best, prev[best]);
        end
      end
      prev_v <= in_valid;
      prev   <= in_scores;
    end
  end

  initial begin
    in_valid = 0; in_scores = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int v = 0; v < VECS; v++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      for (int c = 0; c < CL; c++) in_scores[c] = SW'($urandom_range(90, 100));
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (ties == 0) begin failures++; $display("no tie exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
