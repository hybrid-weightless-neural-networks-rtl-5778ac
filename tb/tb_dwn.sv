// tb_dwn: self-checking test of the weightless classifier.
//
// A reduced classifier (12 activations of 2 bits, 36 thermometer bits,
// 20 + 10 tables, 5 classes) is loaded with random table contents. Random
// activation vectors are then applied on every cycle of a burst, plus gaps.
// A reference model here (thermometer code, wiring rule, table lookup,
// popcount, first-maximum argmax) gives the expected class and scores.
// Each result must arrive exactly 4 cycles after its vector, and a burst of
// consecutive vectors must give results on consecutive cycles (one
// classification per cycle).
module tb_dwn;
  import hwnn_pkg::*;

  localparam int unsigned NA = 12, AB = 2, NT = 3, NB = NA*NT;
  localparam int unsigned L1 = 20, L2 = 10, CL = 5, G = L2/CL, M1 = 7, M2 = 7;
  localparam int unsigned SW = 2, CB = 3, VECS = 400, LAT = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic in_valid, in_ready, out_valid;
  logic [NA*AB-1:0] in_data;
  logic [CB-1:0] out_class;
  logic [SW-1:0] out_max;
  logic [CL-1:0][SW-1:0] out_scores;

  dwn #(.N_ACT(NA), .ABITS(AB), .N_LUT1(L1), .N_LUT2(L2), .CLASSES(CL),
        .MULT1(M1), .MULT2(M2), .SW(SW), .CB(CB)) dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] t1 [L1];
  logic [63:0] t2 [L2];
  longint exp_q [$];
  longint cyc_q [$];
  longint cyc = 0, last_out = -10;
  int unsigned got = 0, back_to_back = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
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

  // reference: class in bits 7:0, score of class c in bits 8+4c +: 4
  function automatic longint model(logic [NA*AB-1:0] x);
    logic [NB-1:0] th;
    logic [L1-1:0] y1;
    logic [L2-1:0] y2;
    int sc [CL];
    int best;
    longint r;
    for (int i = 0; i < NA; i++)
      for (int j = 0; j < NT; j++) th[i*NT + j] = (int'(x[i*AB +: AB]) > j);
    for (int l = 0; l < L1; l++) begin
      int a; a = 0;
      for (int k = 0; k < 6; k++) if (th[((l*6 + k)*M1) % NB]) a |= (1 << k);
      y1[l] = t1[l][a];
    end
    for (int l = 0; l < L2; l++) begin
      int a; a = 0;
      for (int k = 0; k < 6; k++) if (y1[((l*6 + k)*M2 + 1) % L1]) a |= (1 << k);
      y2[l] = t2[l][a];
    end
    best = 0;
    for (int c = 0; c < CL; c++) begin
      sc[c] = 0;
      for (int i = 0; i < G; i++) sc[c] += int'(y2[c*G + i]);
      if (sc[c] > sc[best]) best = c;
    end
    r = best;
    for (int c = 0; c < CL; c++) r |= longint'(sc[c]) << (8 + 4*c);
    return r;
  endfunction

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      exp_q.push_back(model(in_data));
      cyc_q.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        longint e, c0;
        logic [CL-1:0][SW-1:0] es;
        e = exp_q.pop_front();
        c0 = cyc_q.pop_front();
        for (int c = 0; c < CL; c++) es[c] = SW'(e >> (8 + 4*c));
        if (out_class != CB'(e) || out_scores != es || out_max != es[e[7:0]] || cyc - c0 != LAT) begin
          failures++;
          $display("got class %0d exp %0d, latency %0d", out_class, e, cyc - c0);
        end
      end
      if (cyc - last_out == 1) back_to_back++;
      last_out = cyc;
      got++;
    end
  end

  initial begin
    cfg = '0; in_valid = 0; in_data = '0;
    for (int l = 0; l < L1; l++) t1[l] = {$urandom, $urandom};
    for (int l = 0; l < L2; l++) t2[l] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int l = 0; l < L1; l++) begin
      cfg_write(CFG_LUT1, l*2, t1[l][31:0]);
      cfg_write(CFG_LUT1, l*2 + 1, t1[l][63:32]);
    end
    for (int l = 0; l < L2; l++) begin
      cfg_write(CFG_LUT2, l*2, t2[l][31:0]);
      cfg_write(CFG_LUT2, l*2 + 1, t2[l][63:32]);
    end
    for (int v = 0; v < VECS; v++) begin
      @(negedge clk);
      in_valid = (v < VECS/2) ? 1'b1 : ($urandom_range(0, 2) != 0);
      in_data = (NA*AB)'({$urandom, $urandom});
      if (!in_ready) begin failures++; $display("in_ready low"); end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || got < VECS/2) begin
      failures++; $display("results missing");
    end
    checks++;
    if (back_to_back < VECS/2 - 1) begin
      failures++; $display("only %0d back-to-back results", back_to_back);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
