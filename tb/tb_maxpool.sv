// tb_maxpool: self-checking test of the streaming 2x2 max-pool.
//
// An 8x8 map of 4 channels with 3-bit activations is streamed three times
// (random data, random input gaps and random output backpressure); every
// output pixel is compared with the per-channel maximum of its 2x2 block
// computed here, and the number of outputs per map is checked.
module tb_maxpool;
  localparam int unsigned DIM = 8, CH = 4, B = 3, OD = DIM/2, IMGS = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [CH*B-1:0] in_data, out_data;

  maxpool #(.DIM(DIM), .CH(CH), .B(B)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned img [IMGS][DIM][DIM][CH];
  int unsigned got = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [CH*B-1:0] px);
    @(negedge clk);
    in_valid = 1; in_data = px;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n) out_ready <= ($urandom_range(0, 2) != 0);
    if (rst_n && out_valid && out_ready) begin
      int im, r, c;
      im = got / (OD*OD); r = (got % (OD*OD)) / OD; c = got % OD;
      for (int ch = 0; ch < CH; ch++) begin
        int unsigned m;
        m = 0;
        for (int dr = 0; dr < 2; dr++)
          for (int dc = 0; dc < 2; dc++)
            if (img[im][2*r+dr][2*c+dc][ch] > m) m = img[im][2*r+dr][2*c+dc][ch];
        checks++;
        if (out_data[ch*B +: B] != B'(m)) begin
          failures++;
          $display("mismatch img %0d (%0d,%0d) ch %0d: got %0d exp %0d", im, r, c, ch,
                   out_data[ch*B +: B], m);
        end
      end
      got++;
    end
  end

  initial begin
    in_valid = 0; in_data = '0; out_ready = 0;
    for (int im = 0; im < IMGS; im++)
      for (int r = 0; r < DIM; r++)
        for (int c = 0; c < DIM; c++)
          for (int ch = 0; ch < CH; ch++) img[im][r][c][ch] = $urandom_range(0, 7);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int im = 0; im < IMGS; im++)
      for (int r = 0; r < DIM; r++)
        for (int c = 0; c < DIM; c++) begin
          logic [CH*B-1:0] px;
          for (int ch = 0; ch < CH; ch++) px[ch*B +: B] = B'(img[im][r][c][ch]);
          send(px);
          if ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
        end
    @(negedge clk);
    in_valid = 0;
    repeat (50) @(posedge clk);
    checks++;
    if (got != IMGS*OD*OD) begin
      failures++;
      $display("output count %0d, expected %0d", got, IMGS*OD*OD);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
