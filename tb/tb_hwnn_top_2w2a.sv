// tb_hwnn_top_2w2a: end-to-end test of the H-WNN engine in its 2-bit
// configuration (2-bit signed weights, 2-bit unsigned activations, three
// thresholds per channel, 3-bit thermometer code, 9600 DWN input bits), the
// precision of the 2w2a models; all other sizes are the defaults.
//
// Weights (-2..1), ascending threshold triples placed around the expected
// range of each layer's sums, table contents and two images are random. The
// images are sent back to back. A reference model written here (direct
// convolutions with multi-thresholding, 2x2 maxima, thermometer code, the
// table wiring rule, popcounts, first-maximum argmax) predicts each class
// and score vector. It also counts how many of the four activation levels
// occur in each layer, and fails if a layer never uses all four.
module tb_hwnn_top_2w2a;
  import hwnn_pkg::*;

  localparam int unsigned IMGS = 2, CL = NUM_CLASSES, SW = 7, CB = 4;
  localparam int unsigned NL1 = 2000, NL2 = 1000, NACT = 3200, NBITS = 3*NACT;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_valid;
  logic [3:0] cfg_target;
  logic [CFG_AW-1:0] cfg_addr;
  logic [CFG_DW-1:0] cfg_data;
  logic in_valid, in_ready, out_valid;
  logic [23:0] in_data;
  logic [CB-1:0] out_class;
  logic [SW-1:0] out_max;
  logic [CL-1:0][SW-1:0] out_scores;

  hwnn_top #(.WBITS(2), .ABITS(2)) dut (.*);

  int checks = 0, failures = 0;

  // model parameters: weights -2..1, three ascending thresholds per channel
  int w1 [64][27];
  int w2 [64][576];
  int w3 [128][576];
  int w4 [128][1152];
  int th1 [64][3];
  int th2 [64][3];
  int th3 [128][3];
  int th4 [128][3];
  logic [63:0] lut1 [NL1];
  logic [63:0] lut2 [NL2];
  byte unsigned img [IMGS][32][32][3];

  int exp_class [IMGS];
  int exp_score [IMGS][CL];
  bit level_seen [4][4];   // [layer][activation level]

  byte unsigned a1 [30][30][64];
  byte unsigned a2 [28][28][64];
  byte unsigned p1 [14][14][64];
  byte unsigned a3 [12][12][128];
  byte unsigned a4 [10][10][128];
  byte unsigned p2 [5][5][128];

  function automatic int quant(int acc, int t0, int t1, int t2);
    return int'(acc >= t0) + int'(acc >= t1) + int'(acc >= t2);
  endfunction

  function automatic byte unsigned max4(byte unsigned a, byte unsigned b,
                                        byte unsigned c, byte unsigned d);
    byte unsigned m;
    m = a;
    if (b > m) m = b;
    if (c > m) m = c;
    if (d > m) m = d;
    return m;
  endfunction

  // ascending thresholds around the expected sum (mean) with spread sd
  task automatic make_thresh(int mean, int sd, output int t0, output int t1, output int t2);
    int base;
    base = mean + int'($urandom_range(0, sd)) - sd/2;
    t0 = base - sd/2 - int'($urandom_range(0, sd/4));
    t1 = base;
    t2 = base + sd/2 + int'($urandom_range(0, sd/4));
  endtask

  task automatic run_model(int im);
    bit x [NBITS];
    bit y1 [NL1];
    bit y2 [NL2];
    int best;
    // loop bounds held in variables keep the simulator from unrolling the loops
    int n3 = 3, n5 = 5, n6 = 6, n10 = 10, n12 = 12, n14 = 14, n28 = 28, n30 = 30;
    int n64 = 64, n128 = 128;
    for (int r = 0; r < n30; r++) for (int c = 0; c < n30; c++) for (int o = 0; o < n64; o++) begin
      int acc; acc = 0;
      for (int dr = 0; dr < n3; dr++) for (int dc = 0; dc < n3; dc++) for (int ch = 0; ch < n3; ch++)
        acc += w1[o][(dr*3+dc)*3+ch] * int'(img[im][r+dr][c+dc][ch]);
      a1[r][c][o] = 8'(quant(acc, th1[o][0], th1[o][1], th1[o][2]));
      level_seen[0][a1[r][c][o]] = 1;
    end
    for (int r = 0; r < n28; r++) for (int c = 0; c < n28; c++) for (int o = 0; o < n64; o++) begin
      int acc; acc = 0;
      for (int dr = 0; dr < n3; dr++) for (int dc = 0; dc < n3; dc++) for (int ch = 0; ch < n64; ch++)
        acc += w2[o][(dr*3+dc)*64+ch] * int'(a1[r+dr][c+dc][ch]);
      a2[r][c][o] = 8'(quant(acc, th2[o][0], th2[o][1], th2[o][2]));
      level_seen[1][a2[r][c][o]] = 1;
    end
    for (int r = 0; r < n14; r++) for (int c = 0; c < n14; c++) for (int ch = 0; ch < n64; ch++)
      p1[r][c][ch] = max4(a2[2*r][2*c][ch], a2[2*r][2*c+1][ch], a2[2*r+1][2*c][ch], a2[2*r+1][2*c+1][ch]);
    for (int r = 0; r < n12; r++) for (int c = 0; c < n12; c++) for (int o = 0; o < n128; o++) begin
      int acc; acc = 0;
      for (int dr = 0; dr < n3; dr++) for (int dc = 0; dc < n3; dc++) for (int ch = 0; ch < n64; ch++)
        acc += w3[o][(dr*3+dc)*64+ch] * int'(p1[r+dr][c+dc][ch]);
      a3[r][c][o] = 8'(quant(acc, th3[o][0], th3[o][1], th3[o][2]));
      level_seen[2][a3[r][c][o]] = 1;
    end
    for (int r = 0; r < n10; r++) for (int c = 0; c < n10; c++) for (int o = 0; o < n128; o++) begin
      int acc; acc = 0;
      for (int dr = 0; dr < n3; dr++) for (int dc = 0; dc < n3; dc++) for (int ch = 0; ch < n128; ch++)
        acc += w4[o][(dr*3+dc)*128+ch] * int'(a3[r+dr][c+dc][ch]);
      a4[r][c][o] = 8'(quant(acc, th4[o][0], th4[o][1], th4[o][2]));
      level_seen[3][a4[r][c][o]] = 1;
    end
    for (int r = 0; r < n5; r++) for (int c = 0; c < n5; c++) for (int ch = 0; ch < n128; ch++)
      p2[r][c][ch] = max4(a4[2*r][2*c][ch], a4[2*r][2*c+1][ch], a4[2*r+1][2*c][ch], a4[2*r+1][2*c+1][ch]);
    // thermometer code: activation i gives bits 3i..3i+2, bit j = (v > j)
    for (int r = 0; r < n5; r++) for (int c = 0; c < n5; c++) for (int ch = 0; ch < n128; ch++)
      for (int j = 0; j < n3; j++)
        x[((r*5+c)*128 + ch)*3 + j] = (int'(p2[r][c][ch]) > j);
    for (int l = 0; l < n10*200; l++) begin
      int a; a = 0;
      for (int k = 0; k < n6; k++) if (x[(longint'(l*6 + k)*7919) % NBITS]) a |= (1 << k);
      y1[l] = lut1[l][a];
    end
    for (int l = 0; l < n10*100; l++) begin
      int a; a = 0;
      for (int k = 0; k < n6; k++) if (y1[(longint'(l*6 + k)*7907 + 1) % NL1]) a |= (1 << k);
      y2[l] = lut2[l][a];
    end
    best = 0;
    for (int c = 0; c < n10; c++) begin
      exp_score[im][c] = 0;
      for (int i = 0; i < n10*10; i++) exp_score[im][c] += int'(y2[c*100 + i]);
      if (exp_score[im][c] > exp_score[im][best]) best = c;
    end
    exp_class[im] = best;
  endtask

  int unsigned n_cfg = 0, n_stall = 0, got = 0;
  longint cyc = 0, res_cyc [IMGS];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(cfg_target_e t, int unsigned a, logic [31:0] d);
    @(negedge clk);
    cfg_valid = 1; cfg_target = t; cfg_addr = CFG_AW'(a); cfg_data = d;
    n_cfg++;
    @(negedge clk);
    cfg_valid = 0;
  endtask

  task automatic send(logic [23:0] px);
    @(negedge clk);
    in_valid = 1; in_data = px;
    while (!in_ready) begin n_stall++; @(negedge clk); end
    @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (got >= IMGS) begin
        failures++; $display("unexpected result");
      end else begin
        logic [CL-1:0][SW-1:0] es;
        res_cyc[got] = cyc;
        for (int c = 0; c < CL; c++) es[c] = SW'(exp_score[got][c]);
        $display("image %0d: class %0d score %0d (expected %0d)", got, out_class, out_max,
                 exp_class[got]);
        if (out_class != CB'(exp_class[got]) || out_scores != es || out_max != es[exp_class[got]]) begin
          failures++;
          for (int c = 0; c < CL; c++)
            $display("  class %0d score got %0d exp %0d", c, out_scores[c], es[c]);
        end
      end
      got++;
    end
  end

  // one weight row (2 bits per weight) in 32-bit words, word j at addr o*2^wb + j
  task automatic load_row(cfg_target_e t, int o, int wb, int n, ref int w [$]);
    logic [31:0] wd;
    int nw = 16;
    for (int j = 0; j < (2*n + 31)/32; j++) begin
      wd = '0;
      for (int b = 0; b < nw; b++) if (j*16 + b < n) wd[2*b +: 2] = 2'(w[j*16 + b]);
      cfg_write(t, (o << wb) + j, wd);
    end
  endtask

  // Loop bounds below are held in variables: this keeps the simulator from
  // unrolling the set-up loops, which would only slow down its build.
  initial begin
    int q [$];
    int n3 = 3, n27 = 27, n32 = 32, n64 = 64, n128 = 128, n576 = 576, n1152 = 1152;
    int nl1 = NL1, nl2 = NL2, nimg = IMGS, n4 = 4;
    cfg_valid = 0; cfg_target = '0; cfg_addr = '0; cfg_data = '0;
    in_valid = 0; in_data = '0;
    for (int o = 0; o < n64; o++) for (int i = 0; i < n27; i++) w1[o][i] = int'($urandom_range(0, 3)) - 2;
    for (int o = 0; o < n64; o++) for (int i = 0; i < n576; i++) w2[o][i] = int'($urandom_range(0, 3)) - 2;
    for (int o = 0; o < n128; o++) for (int i = 0; i < n576; i++) w3[o][i] = int'($urandom_range(0, 3)) - 2;
    for (int o = 0; o < n128; o++) for (int i = 0; i < n1152; i++) w4[o][i] = int'($urandom_range(0, 3)) - 2;
    // sum statistics: mean = N * E[w] * E[a], spread about sqrt(N * E[(wa)^2])
    for (int o = 0; o < n64; o++) make_thresh(-1721, 900, th1[o][0], th1[o][1], th1[o][2]);
    for (int o = 0; o < n64; o++) make_thresh(-432, 60, th2[o][0], th2[o][1], th2[o][2]);
    for (int o = 0; o < n128; o++) make_thresh(-432, 60, th3[o][0], th3[o][1], th3[o][2]);
    for (int o = 0; o < n128; o++) make_thresh(-864, 80, th4[o][0], th4[o][1], th4[o][2]);
    for (int l = 0; l < nl1; l++) lut1[l] = {$urandom, $urandom};
    for (int l = 0; l < nl2; l++) lut2[l] = {$urandom, $urandom};
    for (int i = 0; i < nimg; i++) for (int r = 0; r < n32; r++) for (int c = 0; c < n32; c++)
      for (int ch = 0; ch < n3; ch++) img[i][r][c][ch] = 8'($urandom);
    for (int im = 0; im < nimg; im++) run_model(im);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // word fields: Conv1 54 bits -> 1 bit, Conv2/3 1152 bits -> 6, Conv4 2304 bits -> 7
    for (int o = 0; o < n64; o++) begin
      q.delete(); for (int i = 0; i < n27; i++) q.push_back(w1[o][i]);
      load_row(CFG_W_CONV1, o, 1, 27, q);
      for (int t = 0; t < n3; t++) cfg_write(CFG_T_CONV1, o*4 + t, 32'(th1[o][t]));
    end
    for (int o = 0; o < n64; o++) begin
      q.delete(); for (int i = 0; i < n576; i++) q.push_back(w2[o][i]);
      load_row(CFG_W_CONV2, o, 6, 576, q);
      for (int t = 0; t < n3; t++) cfg_write(CFG_T_CONV2, o*4 + t, 32'(th2[o][t]));
    end
    for (int o = 0; o < n128; o++) begin
      q.delete(); for (int i = 0; i < n576; i++) q.push_back(w3[o][i]);
      load_row(CFG_W_CONV3, o, 6, 576, q);
      for (int t = 0; t < n3; t++) cfg_write(CFG_T_CONV3, o*4 + t, 32'(th3[o][t]));
    end
    for (int o = 0; o < n128; o++) begin
      q.delete(); for (int i = 0; i < n1152; i++) q.push_back(w4[o][i]);
      load_row(CFG_W_CONV4, o, 7, 1152, q);
      for (int t = 0; t < n3; t++) cfg_write(CFG_T_CONV4, o*4 + t, 32'(th4[o][t]));
    end
    for (int l = 0; l < nl1; l++) begin
      cfg_write(CFG_LUT1, l*2, lut1[l][31:0]);
      cfg_write(CFG_LUT1, l*2 + 1, lut1[l][63:32]);
    end
    for (int l = 0; l < nl2; l++) begin
      cfg_write(CFG_LUT2, l*2, lut2[l][31:0]);
      cfg_write(CFG_LUT2, l*2 + 1, lut2[l][63:32]);
    end
    for (int im = 0; im < nimg; im++)
      for (int r = 0; r < n32; r++)
        for (int c = 0; c < n32; c++)
          send({img[im][r][c][2], img[im][r][c][1], img[im][r][c][0]});
    @(negedge clk);
    in_valid = 0;
    wait (got == IMGS);
    repeat (20) @(posedge clk);
    $display("config writes %0d, input stall cycles %0d, results %0d", n_cfg, n_stall, got);
    checks++;
    if (res_cyc[1] - res_cyc[0] < 57600 - 64 || res_cyc[1] - res_cyc[0] > 57600 + 64) begin
      failures++; $display("result interval %0d, expected about 57600", res_cyc[1] - res_cyc[0]);
    end
    for (int l = 0; l < n4; l++)
      for (int v = 0; v < n4; v++) begin
        checks++;
        if (!level_seen[l][v]) begin
          failures++; $display("layer %0d never produced activation %0d", l + 1, v);
        end
      end
    checks++;
    if (n_stall == 0) begin failures++; $display("no input backpressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
