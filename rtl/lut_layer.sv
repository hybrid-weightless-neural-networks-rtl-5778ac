// lut_layer: one layer of a differentiable weightless network (DWN) mapped
// onto K-input lookup tables.
//
// Each of the N_LUT tables reads K bits of the input vector through fixed
// wiring, uses them as an address (input k is address bit k) and outputs
// the stored bit at that address. Input k of table l is wired to input bit
// ((l*K + k) * MAP_MULT + MAP_OFF) mod N_IN (hwnn_pkg::lut_map); MAP_MULT
// must be coprime to N_IN so that a table's K inputs are distinct.
// The table contents (2^K bits each) are written through the configuration
// bus: target TARGET, addr = {table, word}, word w holding entries
// 32w..32w+31 (word field WB bits wide; a single word for K <= 5).
//
// Timing: the output vector is registered; out_valid follows in_valid one
// cycle later, and a new vector can enter every cycle. The LUT size of 6
// follows the target FPGA's native LUT; the wiring rule and the loading
// scheme are this design's own.
module lut_layer
  import hwnn_pkg::*;
#(
  parameter int unsigned N_IN     = 3200,
  parameter int unsigned N_LUT    = 2000,
  parameter int unsigned K        = LUT_K,
  parameter int unsigned MAP_MULT = 7919,
  parameter int unsigned MAP_OFF  = 0,
  parameter cfg_target_e TARGET   = CFG_LUT1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_t              cfg,
  input  logic              in_valid,
  input  logic [N_IN-1:0]   in_bits,
  output logic              out_valid,
  output logic [N_LUT-1:0]  out_bits
);
  localparam int unsigned ENTRIES = 1 << K;
  localparam int unsigned WPL     = (ENTRIES + CFG_DW - 1) / CFG_DW;
  localparam int unsigned WB      = (WPL < 2) ? 1 : $clog2(WPL);
  localparam int unsigned LB      = (N_LUT < 2) ? 1 : $clog2(N_LUT);

  logic [WPL*CFG_DW-1:0] lmem [N_LUT];
  logic [N_LUT-1:0]      lut_out;

  always_ff @(posedge clk) begin
    if (cfg.valid && cfg.target == TARGET)
      lmem[cfg.addr[WB+LB-1:WB]][cfg.addr[WB-1:0]*CFG_DW +: CFG_DW] <= cfg.data;
  end

  for (genvar l = 0; l < N_LUT; l++) begin : g_lut
    logic [K-1:0] a;
    for (genvar k = 0; k < K; k++) begin : g_in
      assign a[k] = in_bits[lut_map(l, k, K, MAP_MULT, MAP_OFF, N_IN)];
    end
    assign lut_out[l] = lmem[l][a];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bits  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_bits <= lut_out;
    end
  end

endmodule
