// tb_lut_layer: self-checking test of one DWN lookup-table layer.
//
// A layer of 12 six-input tables over a 20-bit input is loaded with random
// contents through the configuration bus, then fed a new random input vector
// on most cycles. The expected outputs come from a model here that applies
// the documented wiring rule ((l*6+k)*MULT+OFF) mod N_IN and table lookup;
// each output must appear exactly one cycle after its input.
module tb_lut_layer;
  import hwnn_pkg::*;

  localparam int unsigned NI = 20, NL = 12, K = 6, MULT = 7, OFF = 3, VECS = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic in_valid, out_valid;
  logic [NI-1:0] in_bits;
  logic [NL-1:0] out_bits;

  lut_layer #(.N_IN(NI), .N_LUT(NL), .K(K), .MAP_MULT(MULT), .MAP_OFF(OFF),
              .TARGET(CFG_LUT2)) dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] tab [NL];
  logic [NL-1:0] exp_q [$];
  longint cyc_q [$];
  longint cyc = 0;
  int unsigned got = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(cfg_target_e t, int unsigned a, logic [31:0] d);
    @(negedge clk);
    cfg.valid = 1; cfg.target = t; cfg.addr = CFG_AW'(a); cfg.data = d;
    @(negedge clk);
    cfg.valid = 0;
  endtask

  function automatic logic [NL-1:0] model(logic [NI-1:0] x);
    logic [NL-1:0] y;
    for (int l = 0; l < NL; l++) begin
      int unsigned a;
      a = 0;
      for (int k = 0; k < K; k++) if (x[((l*K + k)*MULT + OFF) % NI]) a |= (1 << k);
      y[l] = tab[l][a];
    end
    return y;
  endfunction

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      exp_q.push_back(model(in_bits));
      cyc_q.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        logic [NL-1:0] e;
        longint c0;
        e = exp_q.pop_front();
        c0 = cyc_q.pop_front();
        if (out_bits != e || cyc - c0 != 1) begin
          failures++;
          $display("got %b exp %b latency %0d", out_bits, e, cyc - c0);
        end
      end
      got++;
    end
  end

  initial begin
    cfg = '0; in_valid = 0; in_bits = '0;
    for (int l = 0; l < NL; l++) tab[l] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int l = 0; l < NL; l++) begin
      cfg_write(CFG_LUT2, l*2, tab[l][31:0]);
      cfg_write(CFG_LUT2, l*2 + 1, tab[l][63:32]);
    end
    cfg_write(CFG_LUT1, 0, 32'h0);   // other target: must be ignored
    for (int v = 0; v < VECS; v++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_bits = NI'($urandom);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || got < VECS/2) begin
      failures++; $display("outputs missing: %0d left, %0d seen", exp_q.size(), got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
