// tb_conv_layer: self-checking test of one quantized convolution layer.
//
// A small layer (6x6 map, 3 input channels of 2 bits, 4 output channels,
// 2-bit signed weights, 2-bit activations, PE = 2) is loaded with random
// weights and ascending random thresholds over the configuration bus. Three
// random images are streamed back to back; the first two with random
// backpressure on the output, the third without. Every output activation is
// compared with a reference convolution computed here. The third image also
// checks the rate: consecutive outputs of one row are OUT_CH/PE cycles apart.
module tb_conv_layer;
  import hwnn_pkg::*;

  localparam int unsigned DIM = 6, CH = 3, IB = 2, OC = 4, K = 3;
  localparam int unsigned WB = 2, AB = 2, PE = 2;
  localparam int unsigned N = K*K*CH, OD = DIM-K+1, NT = 3, IMGS = 3;
  localparam int unsigned WORDS = (N*WB + 31)/32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [CH*IB-1:0] in_data;
  logic [OC*AB-1:0] out_data;

  conv_layer #(.DIM(DIM), .CH(CH), .IN_BITS(IB), .IN_BIPOLAR(1'b0), .OUT_CH(OC),
               .K(K), .WBITS(WB), .ABITS(AB), .PE(PE),
               .W_TARGET(CFG_W_CONV2), .T_TARGET(CFG_T_CONV2)) dut (.*);

  int checks = 0, failures = 0;
  int signed w [OC][N];
  int signed th [OC][NT];
  int unsigned img [IMGS][DIM][DIM][CH];
  int unsigned exp_act [IMGS][OD*OD][OC];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
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

  // drive one pixel; it is taken at the first rising edge with in_ready high
  task automatic send(logic [CH*IB-1:0] px);
    @(negedge clk);
    in_valid = 1; in_data = px;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
  endtask

  // reference model
  task automatic compute_ref();
    for (int im = 0; im < IMGS; im++)
      for (int r = 0; r < OD; r++)
        for (int c = 0; c < OD; c++)
          for (int o = 0; o < OC; o++) begin
            int acc, cnt;
            acc = 0; cnt = 0;
            for (int dr = 0; dr < K; dr++)
              for (int dc = 0; dc < K; dc++)
                for (int ch = 0; ch < CH; ch++)
                  acc += w[o][(dr*K+dc)*CH+ch] * int'(img[im][r+dr][c+dc][ch]);
            for (int t = 0; t < NT; t++) if (acc >= th[o][t]) cnt++;
            exp_act[im][r*OD+c][o] = cnt;
          end
  endtask

  // output monitor
  int unsigned got = 0;
  longint last_cyc = 0;
  int rate_checks = 0;
  logic bp_on = 1;
  always @(posedge clk) begin
    if (rst_n) out_ready <= bp_on ? ($urandom_range(0, 2) != 0) : 1'b1;
    if (rst_n && out_valid && out_ready) begin
      int im, px;
      im = got / (OD*OD);
      px = got % (OD*OD);
      for (int o = 0; o < OC; o++) begin
        checks++;
        if (out_data[o*AB +: AB] != AB'(exp_act[im][px][o])) begin
          failures++;
          $display("mismatch img %0d px %0d ch %0d: got %0d exp %0d", im, px, o,
                   out_data[o*AB +: AB], exp_act[im][px][o]);
        end
      end
      if (im == IMGS-1 && (px % OD) != 0) begin
        checks++;
        rate_checks++;
        if (cyc - last_cyc != OC/PE) begin
          failures++;
          $display("rate: outputs %0d cycles apart, expected %0d", cyc - last_cyc, OC/PE);
        end
      end
      last_cyc = cyc;
      got++;
    end
  end

  initial begin
    cfg = '0; in_valid = 0; in_data = '0; out_ready = 0;
    for (int o = 0; o < OC; o++) begin
      int signed a, b, c, tmp;
      for (int i = 0; i < N; i++) w[o][i] = int'($urandom_range(0, 3)) - 2;
      a = int'($urandom_range(0, 30)) - 15; b = int'($urandom_range(0, 30)) - 15;
      c = int'($urandom_range(0, 30)) - 15;
      if (a > b) begin tmp = a; a = b; b = tmp; end
      if (b > c) begin tmp = b; b = c; c = tmp; end
      if (a > b) begin tmp = a; a = b; b = tmp; end
      th[o][0] = a; th[o][1] = b; th[o][2] = c;
    end
    for (int im = 0; im < IMGS; im++)
      for (int r = 0; r < DIM; r++)
        for (int c = 0; c < DIM; c++)
          for (int ch = 0; ch < CH; ch++) img[im][r][c][ch] = $urandom_range(0, 3);
    compute_ref();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int o = 0; o < OC; o++) begin
      logic [WORDS*32-1:0] row = '0;
      for (int i = 0; i < N; i++) row[i*WB +: WB] = WB'(w[o][i]);
      for (int j = 0; j < WORDS; j++) cfg_write(CFG_W_CONV2, o*2 + j, row[j*32 +: 32]);
      for (int t = 0; t < NT; t++) cfg_write(CFG_T_CONV2, o*4 + t, 32'(th[o][t]));
    end
    // a write to another target must not disturb this layer
    cfg_write(CFG_W_CONV1, 0, 32'hFFFF_FFFF);
    for (int im = 0; im < IMGS; im++) begin
      if (im == IMGS-1) begin
        @(negedge clk);
        in_valid = 0;
        wait (got == (IMGS-1)*OD*OD);
        @(posedge clk);
        bp_on = 0;
      end
      for (int r = 0; r < DIM; r++)
        for (int c = 0; c < DIM; c++) begin
          logic [CH*IB-1:0] px;
          for (int ch = 0; ch < CH; ch++) px[ch*IB +: IB] = IB'(img[im][r][c][ch]);
          send(px);
          if (im < IMGS-1 && $urandom_range(0, 3) == 0) begin
            @(negedge clk);
            in_valid = 0;
          end
        end
    end
    @(negedge clk);
    in_valid = 0;
    wait (got == IMGS*OD*OD);
    repeat (5) @(posedge clk);
    checks++;
    if (rate_checks == 0) begin failures++; $display("rate never checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

