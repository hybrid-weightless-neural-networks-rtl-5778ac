// mvtu: matrix-vector-threshold unit of a quantized convolution layer.
//
// For each accepted input window (N activations) the unit computes, for every
// output channel o, the dot product acc_o = sum_i w[o][i] * a[i] and turns it
// into an ABITS-bit activation by multi-thresholding: the output is the number
// of the channel's 2^ABITS-1 thresholds T[o][t] with acc_o >= T[o][t]. This
// replaces batch normalisation and the quantizing activation, as in
// dataflow QNN accelerators. With 1-bit weights and activations the products
// are +-1 and the sum is an XNOR-popcount.
//
// Folding: PE output channels are computed per cycle, so a window takes
// OUT_CH/PE cycles. The finished output pixel (OUT_CH activations) is held in
// an output register with valid/ready; the next window is accepted in the
// cycle the last channel group is computed, so back-to-back windows leave no
// bubble.
//
// Parameters are written through the configuration bus:
//   target W_TARGET: weight word; addr = {row, word}, word field WB bits wide.
//                    Row o holds w[o][i] at bits i*WBITS +: WBITS.
//   target T_TARGET: threshold; addr = {row, t}, t field TB bits wide,
//                    data = signed threshold (low ACC_W bits used).
// Thresholds of a channel must be ascending. Memories are not reset.
module mvtu
  import hwnn_pkg::*;
#(
  parameter int unsigned N          = 27,
  parameter int unsigned IN_BITS    = 8,
  parameter bit          IN_BIPOLAR = 1'b0,
  parameter int unsigned OUT_CH     = 64,
  parameter int unsigned WBITS      = 1,
  parameter int unsigned ABITS      = 1,
  parameter int unsigned PE         = 1,
  parameter cfg_target_e W_TARGET   = CFG_W_CONV1,
  parameter cfg_target_e T_TARGET   = CFG_T_CONV1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  cfg_t                     cfg,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [N*IN_BITS-1:0]     in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [OUT_CH*ABITS-1:0]  out_data
);
  localparam int unsigned NT     = num_thresh(ABITS);
  localparam int unsigned AMAX   = IN_BIPOLAR ? 1 : (1 << IN_BITS) - 1;
  localparam int unsigned WMAX   = (WBITS == 1) ? 1 : (1 << (WBITS - 1));
  localparam int unsigned ACC_W  = $clog2(N * AMAX * WMAX + 1) + 1;
  localparam int unsigned WORDS  = (N * WBITS + CFG_DW - 1) / CFG_DW;
  localparam int unsigned WB     = (WORDS < 2) ? 1 : $clog2(WORDS);
  localparam int unsigned TB     = (NT < 2) ? 1 : $clog2(NT);
  localparam int unsigned RB     = (OUT_CH < 2) ? 1 : $clog2(OUT_CH);
  localparam int unsigned GROUPS = OUT_CH / PE;
  localparam int unsigned GB     = (GROUPS < 2) ? 1 : $clog2(GROUPS);

  // ---------------------------------------------------------------- memories
  logic [WORDS*CFG_DW-1:0] wmem [OUT_CH];
  logic signed [ACC_W-1:0] tmem [OUT_CH][NT];

  always_ff @(posedge clk) begin
    if (cfg.valid && cfg.target == W_TARGET)
      wmem[cfg.addr[WB+RB-1:WB]][cfg.addr[WB-1:0]*CFG_DW +: CFG_DW] <= cfg.data;
    if (cfg.valid && cfg.target == T_TARGET)
      tmem[cfg.addr[TB+RB-1:TB]][cfg.addr[TB-1:0]] <= cfg.data[ACC_W-1:0];
  end

  // ----------------------------------------------------------------- control
  logic                   busy;
  logic [GB-1:0]          grp;
  logic [N*IN_BITS-1:0]   win;
  logic [OUT_CH*ABITS-1:0] work;
  logic                   last_grp, step, in_fire;
  logic [PE*ABITS-1:0]    grp_act;

  assign last_grp = (grp == GB'(GROUPS - 1));
  // a group may be computed unless it is the last one and the output is full
  assign step     = busy && (!last_grp || !out_valid || out_ready);
  assign in_ready = !busy || (step && last_grp);
  assign in_fire  = in_valid && in_ready;

  // ------------------------------------------------------------- datapath
  function automatic logic signed [ACC_W-1:0] act_val(logic [IN_BITS-1:0] a);
    if (IN_BIPOLAR) return a[0] ? ACC_W'(1) : -ACC_W'(1);
    return ACC_W'(a);
  endfunction

  function automatic logic signed [ACC_W-1:0] w_val(logic [WBITS-1:0] w);
    if (WBITS == 1) return w[0] ? ACC_W'(1) : -ACC_W'(1);
    return ACC_W'(signed'(w));
  endfunction

  always_comb begin
    grp_act = '0;
    for (int unsigned p = 0; p < PE; p++) begin
      logic signed [ACC_W-1:0] acc;
      logic [WORDS*CFG_DW-1:0] wrow;
      int unsigned             o;
      int unsigned             cnt;
      o    = int'(grp) * PE + p;
      wrow = wmem[o];
      acc  = '0;
      for (int unsigned i = 0; i < N; i++)
        acc += w_val(wrow[i*WBITS +: WBITS]) * act_val(win[i*IN_BITS +: IN_BITS]);
      cnt = 0;
      for (int unsigned t = 0; t < NT; t++)
        if (acc >= tmem[o][t]) cnt++;
      grp_act[p*ABITS +: ABITS] = ABITS'(cnt);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      grp       <= '0;
      win       <= '0;
      work      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (step) begin
        work[int'(grp)*PE*ABITS +: PE*ABITS] <= grp_act;
        if (last_grp) begin
          out_valid <= 1'b1;
          out_data  <= work;
          out_data[int'(grp)*PE*ABITS +: PE*ABITS] <= grp_act;
          busy      <= 1'b0;
          grp       <= '0;
        end else begin
          grp <= grp + 1'b1;
        end
      end
      if (in_fire) begin
        win  <= in_data;
        busy <= 1'b1;
        grp  <= '0;
      end
    end
  end

endmodule
