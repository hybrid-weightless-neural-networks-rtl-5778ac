// tb_flatten: self-checking test of the flatten buffer.
//
// Four maps of 5 pixels (12 bits each) are streamed with random gaps while
// the consumer applies random backpressure. Each emitted vector must hold the
// pixels of its map at the documented positions, one vector per map, and no
// pixel may be accepted while a full vector waits.
module tb_flatten;
  localparam int unsigned NP = 5, PW = 12, MAPS = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [PW-1:0] in_data;
  logic [NP*PW-1:0] out_data;

  flatten #(.N_PIX(NP), .PIX_W(PW)) dut (.*);

  int checks = 0, failures = 0;
  logic [PW-1:0] pix [MAPS][NP];
  int unsigned got = 0, stalls = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [PW-1:0] px);
    @(negedge clk);
    in_valid = 1; in_data = px;
    while (!in_ready) begin stalls++; @(negedge clk); end
    @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n) out_ready <= ($urandom_range(0, 3) == 0);
    if (rst_n && out_valid && in_ready) begin
      failures++;
      $display("input accepted while a vector is pending");
    end
    if (rst_n && out_valid && out_ready) begin
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (out_data[p*PW +: PW] != pix[got][p]) begin
          failures++;
          $display("map %0d pixel %0d: got %h exp %h", got, p, out_data[p*PW +: PW], pix[got][p]);
        end
      end
      got++;
    end
  end

  initial begin
    in_valid = 0; in_data = '0; out_ready = 0;
    for (int m = 0; m < MAPS; m++)
      for (int p = 0; p < NP; p++) pix[m][p] = PW'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < MAPS; m++)
      for (int p = 0; p < NP; p++) begin
        send(pix[m][p]);
        if ($urandom_range(0, 2) == 0) begin @(negedge clk); in_valid = 0; end
      end
    @(negedge clk);
    in_valid = 0;
    repeat (100) @(posedge clk);
    checks++;
    if (got != MAPS) begin failures++; $display("got %0d vectors, expected %0d", got, MAPS); end
    checks++;
    if (stalls == 0) begin failures++; $display("backpressure never reached the input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
