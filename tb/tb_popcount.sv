// tb_popcount: self-checking test of the per-class popcount.
//
// 40 table outputs in 4 classes of 10: random vectors (plus all-zero and
// all-one vectors) enter on successive cycles; each class score must equal
// the number of ones in its group, one cycle after the vector.
module tb_popcount;
  localparam int unsigned NI = 40, CL = 4, G = NI/CL, SW = 4, VECS = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic [NI-1:0] in_bits;
  logic [CL-1:0][SW-1:0] out_scores;

  popcount #(.N_IN(NI), .CLASSES(CL), .SW(SW)) dut (.*);

  int checks = 0, failures = 0;
  logic [NI-1:0] prev;
  logic prev_v = 0;

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
        for (int c = 0; c < CL; c++) begin
          int n;
          n = 0;
          for (int i = 0; i < G; i++) n += int'(prev[c*G + i]);
          checks++;
          if (out_scores[c] != SW'(n)) begin
            failures++; $display("class %0d: got %0d exp %0d", c, out_scores[c], n);
          end
        end
      end
      prev_v <= in_valid;
      prev   <= in_bits;
    end
  end

  initial begin
    in_valid = 0; in_bits = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int v = 0; v < VECS; v++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      in_bits = (v == 0) ? '0 : (v == 1) ? '1 : {$urandom, $urandom};
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
