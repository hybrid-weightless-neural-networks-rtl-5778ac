// tb_hwnn_top: end-to-end test of the H-WNN engine at its default sizes
// (1-bit weights and activations, 32x32x3 input, 64/128-channel front end,
// 2000 + 1000 six-input tables, 10 classes).
//
// All weights, thresholds and table contents are drawn at random and
// written through the configuration bus. Three random images are then
// streamed, the second directly behind the first, the third after a pause
// and with random gaps. A reference model of the whole network written here
// (direct convolution loops, 2x2 maxima, the table wiring rule, popcounts
// and first-maximum argmax) predicts each class and score vector.
//
// Mechanisms that must occur and are counted: configuration writes,
// backpressure on the pixel input (the folded Conv1 takes one pixel per
// 64 cycles), two images in flight at once, input gaps, and results.
// The cycles from first pixel to result are printed; the interval between
// the results of two back-to-back images must be 900 x 64 cycles (+-64).
module tb_hwnn_top;
  import hwnn_pkg::*;

  localparam int unsigned IMGS = 3, CL = NUM_CLASSES, SW = 7, CB = 4;
  localparam int unsigned NL1 = 2000, NL2 = 1000, NACT = 3200;

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

  hwnn_top dut (.*);

  int checks = 0, failures = 0;

  // parameters of the network
  bit   w1 [64][27];
  bit   w2 [64][576];
  bit   w3 [128][576];
  bit   w4 [128][1152];
  int   th1 [64];
  int   th2 [64];
  int   th3 [128];
  int   th4 [128];
  logic [63:0] lut1 [NL1];
  logic [63:0] lut2 [NL2];
  byte unsigned img [IMGS][32][32][3];

  // reference results
  int exp_class [IMGS];
  int exp_score [IMGS][CL];

  // activations of the reference model (1 = +1, 0 = -1)
  bit a1 [30][30][64];
  bit a2 [28][28][64];
  bit p1 [14][14][64];
  bit a3 [12][12][128];
  bit a4 [10][10][128];
  bit p2 [5][5][128];

  task automatic run_model(int im);
    bit x [NACT];
    bit y1 [NL1];
    bit y2 [NL2];
    int best;
    // loop bounds held in variables keep the simulator from unrolling the loops
    int n2 = 2, n3 = 3, n5 = 5, n6 = 6, n64 = 64;
    for (int r = 0; r < n2*15; r++) for (int c = 0; c < n2*15; c++) for (int o = 0; o < n2*32; o++) begin
      int acc; acc = 0;
      for (int dr = 0; dr < n3; dr++) for (int dc = 0; dc < n3; dc++) for (int ch = 0; ch < n3; ch++)
        acc += (w1[o][(dr*3+dc)*3+ch] ? 1 : -1) * int'(img[im][r+dr][c+dc][ch]);
      a1[r][c][o] = (acc >= th1[o]);
    end
    for (int r = 0; r < n2*14; r++) for (int c = 0; c < n2*14; c++) for (int o = 0; o < n2*32; o++) begin
      int acc; acc = 0;
      for (int dr = 0; dr < n3; dr++) for (int dc = 0; dc < n3; dc++) for (int ch = 0; ch < n64; ch++)
        acc += (w2[o][(dr*3+dc)*64+ch] == a1[r+dr][c+dc][ch]) ? 1 : -1;
      a2[r][c][o] = (acc >= th2[o]);
    end
    for (int r = 0; r < n2*7; r++) for (int c = 0; c < n2*7; c++) for (int ch = 0; ch < n2*32; ch++)
      p1[r][c][ch] = a2[2*r][2*c][ch] | a2[2*r][2*c+1][ch] | a2[2*r+1][2*c][ch] | a2[2*r+1][2*c+1][ch];
    for (int r = 0; r < n2*6; r++) for (int c = 0; c < n2*6; c++) for (int o = 0; o < n2*64; o++) begin
      int acc; acc = 0;
      for (int dr = 0; dr < n3; dr++) for (int dc = 0; dc < n3; dc++) for (int ch = 0; ch < n64; ch++)
        acc += (w3[o][(dr*3+dc)*64+ch] == p1[r+dr][c+dc][ch]) ? 1 : -1;
      a3[r][c][o] = (acc >= th3[o]);
    end
    for (int r = 0; r < n2*5; r++) for (int c = 0; c < n2*5; c++) for (int o = 0; o < n2*64; o++) begin
      int acc; acc = 0;
      for (int dr = 0; dr < n3; dr++) for (int dc = 0; dc < n3; dc++) for (int ch = 0; ch < 2*n64; ch++)
        acc += (w4[o][(dr*3+dc)*128+ch] == a3[r+dr][c+dc][ch]) ? 1 : -1;
      a4[r][c][o] = (acc >= th4[o]);
    end
    for (int r = 0; r < n5; r++) for (int c = 0; c < n5; c++) for (int ch = 0; ch < n2*64; ch++)
      p2[r][c][ch] = a4[2*r][2*c][ch] | a4[2*r][2*c+1][ch] | a4[2*r+1][2*c][ch] | a4[2*r+1][2*c+1][ch];
    for (int r = 0; r < n5; r++) for (int c = 0; c < n5; c++) for (int ch = 0; ch < n2*64; ch++)
      x[(r*5+c)*128 + ch] = p2[r][c][ch];
    for (int l = 0; l < n2*(NL1/2); l++) begin
      int a; a = 0;
      for (int k = 0; k < n6; k++) if (x[(longint'(l*6 + k)*7919) % NACT]) a |= (1 << k);
      y1[l] = lut1[l][a];
    end
    for (int l = 0; l < n2*(NL2/2); l++) begin
      int a; a = 0;
      for (int k = 0; k < n6; k++) if (y1[(longint'(l*6 + k)*7907 + 1) % NL1]) a |= (1 << k);
      y2[l] = lut2[l][a];
    end
    best = 0;
    for (int c = 0; c < n2*(CL/2); c++) begin
      exp_score[im][c] = 0;
      for (int i = 0; i < n2*(NL2/CL/2); i++) exp_score[im][c] += int'(y2[c*(NL2/CL) + i]);
      if (exp_score[im][c] > exp_score[im][best]) best = c;
    end
    exp_class[im] = best;
  endtask

  // ------------------------------------------------------------ stimulus
  int unsigned n_cfg = 0, n_stall = 0, n_gap = 0, n_overlap = 0, got = 0;
  longint cyc = 0, first_px [IMGS], res_cyc [IMGS];
  int unsigned sent_imgs = 0;
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
      res_cyc[got] = cyc;
      if (got >= IMGS) begin
        failures++; $display("unexpected result");
      end else begin
        logic [CL-1:0][SW-1:0] es;
        for (int c = 0; c < CL; c++) es[c] = SW'(exp_score[got][c]);
        $display("image %0d: class %0d score %0d (expected %0d), %0d cycles after its first pixel",
                 got, out_class, out_max, exp_class[got], cyc - first_px[got]);
        if (out_class != CB'(exp_class[got]) || out_scores != es || out_max != es[exp_class[got]]) begin
          failures++;
          for (int c = 0; c < CL; c++)
            $display("  class %0d score got %0d exp %0d", c, out_scores[c], es[c]);
        end
      end
      got++;
    end
  end

  initial begin
    cfg_valid = 0; cfg_target = '0; cfg_addr = '0; cfg_data = '0;
    in_valid = 0; in_data = '0;
    foreach (w1[o, i]) w1[o][i] = 1'($urandom);
    foreach (w2[o, i]) w2[o][i] = 1'($urandom);
    foreach (w3[o, i]) w3[o][i] = 1'($urandom);
    foreach (w4[o, i]) w4[o][i] = 1'($urandom);
    foreach (th1[o]) th1[o] = int'($urandom_range(0, 600)) - 300;
    foreach (th2[o]) th2[o] = int'($urandom_range(0, 16)) - 8;
    foreach (th3[o]) th3[o] = int'($urandom_range(0, 16)) - 8;
    foreach (th4[o]) th4[o] = int'($urandom_range(0, 16)) - 8;
    foreach (lut1[l]) lut1[l] = {$urandom, $urandom};
    foreach (lut2[l]) lut2[l] = {$urandom, $urandom};
    foreach (img[i, r, c, ch]) img[i][r][c][ch] = 8'($urandom);
    for (int im = 0; im < IMGS; im++) run_model(im);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // weights: row o word j at addr o*2^WB + j (WB >= 1); thresholds at o*2
    for (int o = 0; o < 64; o++) begin
      logic [31:0] wd; wd = '0;
      for (int i = 0; i < 27; i++) wd[i] = w1[o][i];
      cfg_write(CFG_W_CONV1, o*2, wd);
      cfg_write(CFG_T_CONV1, o*2, 32'(th1[o]));
    end
    for (int o = 0; o < 64; o++) begin
      for (int j = 0; j < 18; j++) begin
        logic [31:0] wd;
        for (int b = 0; b < 32; b++) wd[b] = w2[o][j*32 + b];
        cfg_write(CFG_W_CONV2, o*32 + j, wd);
      end
      cfg_write(CFG_T_CONV2, o*2, 32'(th2[o]));
    end
    for (int o = 0; o < 128; o++) begin
      for (int j = 0; j < 18; j++) begin
        logic [31:0] wd;
        for (int b = 0; b < 32; b++) wd[b] = w3[o][j*32 + b];
        cfg_write(CFG_W_CONV3, o*32 + j, wd);
      end
      cfg_write(CFG_T_CONV3, o*2, 32'(th3[o]));
    end
    for (int o = 0; o < 128; o++) begin
      for (int j = 0; j < 36; j++) begin
        logic [31:0] wd;
        for (int b = 0; b < 32; b++) wd[b] = w4[o][j*32 + b];
        cfg_write(CFG_W_CONV4, o*64 + j, wd);
      end
      cfg_write(CFG_T_CONV4, o*2, 32'(th4[o]));
    end
    for (int l = 0; l < NL1; l++) begin
      cfg_write(CFG_LUT1, l*2, lut1[l][31:0]);
      cfg_write(CFG_LUT1, l*2 + 1, lut1[l][63:32]);
    end
    for (int l = 0; l < NL2; l++) begin
      cfg_write(CFG_LUT2, l*2, lut2[l][31:0]);
      cfg_write(CFG_LUT2, l*2 + 1, lut2[l][63:32]);
    end
    for (int im = 0; im < IMGS; im++) begin
      if (im == IMGS-1) begin
        @(negedge clk);
        in_valid = 0;
        wait (got == IMGS-1);
        repeat (20) @(posedge clk);
      end
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 32; c++) begin
          if (r == 0 && c == 0) first_px[im] = cyc + 1;
          if (r == 0 && c == 0 && got < im) n_overlap++;
          send({img[im][r][c][2], img[im][r][c][1], img[im][r][c][0]});
          if (im == IMGS-1 && $urandom_range(0, 7) == 0) begin
            @(negedge clk); in_valid = 0; n_gap++;
            repeat ($urandom_range(0, 100)) @(negedge clk);
          end
        end
    end
    @(negedge clk);
    in_valid = 0;
    wait (got == IMGS);
    repeat (20) @(posedge clk);
    $display("config writes %0d, input stall cycles %0d, input gaps %0d, overlapped images %0d, results %0d",
             n_cfg, n_stall, n_gap, n_overlap, got);
    $display("cycles between results 0 and 1: %0d", res_cyc[1] - res_cyc[0]);
    // images 0 and 1 were sent back to back: Conv1 (900 windows x 64 cycles)
    // sets the interval between their results
    checks++;
    if (res_cyc[1] - res_cyc[0] < 57600 - 64 || res_cyc[1] - res_cyc[0] > 57600 + 64) begin
      failures++; $display("result interval %0d, expected about 57600", res_cyc[1] - res_cyc[0]);
    end
    checks += 5;
    if (n_cfg == 0)     begin failures++; $display("no configuration write"); end
    if (n_stall == 0)   begin failures++; $display("no input backpressure"); end
    if (n_gap == 0)     begin failures++; $display("no input gap"); end
    if (n_overlap == 0) begin failures++; $display("images never overlapped"); end
    if (got != IMGS)    begin failures++; $display("result count %0d", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
